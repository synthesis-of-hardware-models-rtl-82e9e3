// tb_spc_system: end-to-end testbench of the whole design at its default
// sizes (three 32-byte segments, 16-block general-purpose allocators,
// 4-byte specific-purpose blocks).
//
// It first runs the paper's small programs as command sequences:
//   - a pointer that may reference either of two segments (malloc(1) in one,
//     malloc(4) in the other, chosen by a run-time value), a load through it
//     and free(p) steered by the pointer's tag;
//   - a variable whose address is taken, read back as short halves after an
//     int store (pointer type casting);
//   - three mallocs of one constant size and two frees, in each segment;
// then random traffic: malloc in any segment, stores and loads through live
// pointers plus a byte offset (pointer arithmetic on the index), frees of
// live pointers, and refused commands (unknown tag, freeing the register,
// freeing a block twice, accesses past the end of a segment, mallocs that do
// not fit).
// A model of the three segments predicts every pointer returned by malloc
// (lowest-addressed fitting free region and lowest empty slot for the two
// general-purpose kinds, lowest free element for the specific-purpose one)
// and every loaded value. Each mechanism is counted and must occur at least
// once: a malloc and a free in every segment, merges below, above and on both
// sides in both general-purpose segments, a failed malloc in every segment,
// a refused free, an out-of-range access, a typed register access and a load
// through an incremented pointer.
module tb_spc_system;
  import spc_pkg::*;

  localparam int SEG   = 32;
  localparam int MAXB  = 16;
  localparam int K     = 4;
  localparam int NSEG  = 3;
  localparam int NOPS  = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cmd_t        cmd;
  logic        cmd_valid, cmd_ready;
  result_t     res;
  logic        res_valid;
  logic [31:0] reg_value;

  spc_system dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .res, .res_valid, .reg_value);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_malloc [NSEG], n_free [NSEG], n_fail [NSEG];
  int n_mbelow [NSEG], n_mabove [NSEG], n_mboth [NSEG];
  int n_badfree = 0, n_oob = 0, n_regcast = 0, n_ptrarith = 0, n_badtag = 0, n_loads = 0;

  // model: occupancy, contents, allocated-list slots
  bit          used  [NSEG][SEG];
  bit          known [NSEG][SEG];
  logic [7:0]  data  [NSEG][SEG];
  bit          slot_live [NSEG][MAXB];
  logic [31:0] reg_model;

  // live pointers
  localparam int MAXP = 64;
  ptr_t        lp   [MAXP];
  int          lsz  [MAXP];
  int          lslot[MAXP];   // allocated-list slot the model expects
  int          nlive = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input cmd_t c, output result_t r);
    int guard = 0;
    cmd = c; cmd_valid = 1'b1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    while (!res_valid && guard < 200) begin @(posedge clk); #1; guard++; end
    check(res_valid, "command answered");
    r = res;
  endtask

  function automatic cmd_t mk(cmd_op_e op, int seg, int size, width_e w, ptr_t p, logic [31:0] wd);
    cmd_t c;
    c.op = op; c.seg = TAG_W'(seg); c.size = SIZE_W'(size); c.width = w; c.ptr = p; c.wdata = wd;
    return c;
  endfunction

  // expected malloc result from the model; -1 address when it must fail
  task automatic model_malloc(int s, int size, output int addr, output int slot);
    addr = -1; slot = 0;
    if (s == 2) begin
      if (size < 1 || size > K) return;
      for (int e = SEG / K - 1; e >= 0; e--) if (!used[s][e * K]) addr = e * K;
      return;
    end
    slot = -1;
    for (int i = MAXB - 1; i >= 0; i--) if (!slot_live[s][i]) slot = i;
    if (slot < 0 || size < 1) return;
    for (int a = 0; a < SEG; a++) begin
      if (!used[s][a] && (a == 0 || used[s][a-1])) begin
        int len = 0;
        while (a + len < SEG && !used[s][a+len]) len++;
        if (len >= size) begin addr = a; return; end
      end
    end
  endtask

  task automatic do_malloc(int s, int size, output ptr_t p, output bit ok);
    result_t r; int addr, slot;
    model_malloc(s, size, addr, slot);
    run(mk(CMD_MALLOC, s, size, W_INT, '0, '0), r);
    ok = (addr >= 0);
    check(r.err == !ok, $sformatf("malloc(%0d) in segment %0d: err=%0d", size, s, r.err));
    p = r.ptr;
    if (!ok) begin n_fail[s]++; return; end
    n_malloc[s]++;
    check(r.ptr.tag == TAG_W'(s) && 32'(r.ptr.index) == addr &&
          32'(r.ptr.alloc_tag) == ((s == 1) ? slot : 0),
          $sformatf("malloc(%0d) seg %0d gave %h, expected index %0d slot %0d",
                    size, s, r.ptr, addr, slot));
    if (!r.err) begin
      int sz = (s == 2) ? K : size;
      for (int b = 0; b < sz; b++) begin used[s][addr + b] = 1; known[s][addr + b] = 0; end
      if (s != 2) slot_live[s][slot] = 1;
      if (nlive < MAXP) begin lp[nlive] = r.ptr; lsz[nlive] = sz; lslot[nlive] = slot; nlive++; end
    end
  endtask

  task automatic do_free_at(int i);
    result_t r; ptr_t p = lp[i]; int s = p.tag; int a = p.index; int sz = lsz[i];
    bit below = (a > 0) && !used[s][a-1];
    bit above = (a + sz < SEG) && !used[s][a+sz];
    run(mk(CMD_FREE, 0, 0, W_INT, p, '0), r);
    check(!r.err, $sformatf("free of %h refused", p));
    n_free[s]++;
    if (s != 2) begin
      if (below && above) n_mboth[s]++; else if (below) n_mbelow[s]++; else if (above) n_mabove[s]++;
      slot_live[s][lslot[i]] = 0;
    end
    for (int b = 0; b < sz; b++) used[s][a + b] = 0;
    lp[i] = lp[nlive - 1]; lsz[i] = lsz[nlive - 1]; lslot[i] = lslot[nlive - 1]; nlive--;
    // a second free of the same block must be refused
    if ($urandom_range(7) == 0) begin
      run(mk(CMD_FREE, 0, 0, W_INT, p, '0), r);
      check(r.err, $sformatf("double free of %h accepted", p));
      n_badfree++;
    end
  endtask

  task automatic mem_op(bit st, width_e w, ptr_t p, logic [31:0] wd);
    result_t r; int n = width_bytes(w); int s = p.tag; int a = p.index;
    bit ok = (a + n <= SEG);
    run(mk(st ? CMD_STORE : CMD_LOAD, 0, 0, w, p, wd), r);
    check(r.err == !ok, $sformatf("access %h width %0d err=%0d", p, n, r.err));
    if (!ok) begin n_oob++; return; end
    if (st) begin
      for (int b = 0; b < n; b++) begin data[s][a + b] = wd[8*(n-1-b) +: 8]; known[s][a + b] = 1; end
    end else begin
      logic [31:0] exp = '0; bit all = 1;
      for (int b = 0; b < n; b++) begin exp = (exp << 8) | 32'(data[s][a + b]); all &= known[s][a + b]; end
      if (all) begin
        n_loads++;
        check(r.rdata == exp, $sformatf("load %h width %0d = %h, expected %h", p, n, r.rdata, exp));
      end
    end
  endtask

  task automatic reg_op(bit st, width_e w, int idx, logic [31:0] wd);
    result_t r; int n = width_bytes(w); bit ok = (idx + n <= 4);
    logic [31:0] exp = '0;
    run(mk(st ? CMD_STORE : CMD_LOAD, 0, 0, w, '{alloc_tag: 0, tag: TAG_W'(NSEG), index: INDEX_W'(idx)}, wd), r);
    check(r.err == !ok, "register access range");
    if (!ok) begin n_oob++; return; end
    for (int b = 0; b < n; b++) begin
      int pos = 3 - (idx + b);
      if (st) reg_model[8*pos +: 8] = wd[8*(n-1-b) +: 8];
      else    exp = (exp << 8) | 32'(reg_model[8*pos +: 8]);
    end
    if (!st) check(r.rdata == exp, $sformatf("register load %h, expected %h", r.rdata, exp));
    if (w != W_INT) n_regcast++;
    check(reg_value == reg_model, "register contents");
  endtask

  // free the most recently allocated live pointers of segment s (test1/test2)
  task automatic free_last_of(int s);
    for (int i = nlive - 1; i >= 0; i--) if (lp[i].tag == TAG_W'(s)) begin do_free_at(i); return; end
  endtask

  initial begin
    ptr_t p; bit ok; result_t r;
    for (int s = 0; s < NSEG; s++) begin
      n_malloc[s] = 0; n_free[s] = 0; n_fail[s] = 0; n_mbelow[s] = 0; n_mabove[s] = 0; n_mboth[s] = 0;
      for (int a = 0; a < SEG; a++) begin used[s][a] = 0; known[s][a] = 0; data[s][a] = '0; end
      for (int i = 0; i < MAXB; i++) slot_live[s][i] = 0;
    end
    cmd = '0; cmd_valid = 1'b0; reg_model = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // a pointer into one of two segments, chosen at run time
    for (int i = 0; i < 2; i++) begin
      do_malloc(i == 0 ? 1 : 2, i == 0 ? 1 : 4, p, ok);
      mem_op(1, i == 0 ? W_BYTE : W_INT, p, 32'h5A5A_0000 + i);
      mem_op(0, i == 0 ? W_BYTE : W_INT, p, '0);
      do_free_at(nlive - 1);
    end
    // a variable whose address is taken, accessed as int and as shorts
    reg_op(1, W_INT, 0, 32'h1234_5678);
    reg_op(0, W_SHORT, 0, '0);
    reg_op(0, W_SHORT, 2, '0);
    reg_op(1, W_SHORT, 0, 32'hBEEF);
    reg_op(0, W_BYTE, 1, '0);
    // three mallocs of one size, two frees, in every segment
    for (int s = 0; s < NSEG; s++) begin
      for (int i = 0; i < 3; i++) do_malloc(s, 4, p, ok);
      free_last_of(s); free_last_of(s);
    end
    // refused commands
    run(mk(CMD_FREE, 0, 0, W_INT, '{alloc_tag: 0, tag: TAG_W'(NSEG), index: 0}, '0), r);
    check(r.err, "freeing the register must fail"); n_badtag++;
    run(mk(CMD_LOAD, 0, 0, W_INT, '{alloc_tag: 0, tag: 8'd7, index: 0}, '0), r);
    check(r.err, "load through an unknown tag must fail"); n_badtag++;

    // random traffic
    for (int n = 0; n < NOPS; n++) begin
      automatic int k = $urandom_range(99);
      if (k < 30) begin
        automatic int s = $urandom_range(NSEG - 1);
        do_malloc(s, (s == 2) ? $urandom_range(1, K + 1) : $urandom_range(1, 10), p, ok);
      end else if (k < 50) begin
        if (nlive > 0) do_free_at($urandom_range(nlive - 1));
      end else if (k < 92) begin
        if (nlive > 0) begin
          automatic int i = $urandom_range(nlive - 1);
          automatic width_e w = width_e'($urandom_range(2));
          automatic int off = $urandom_range(lsz[i] - 1);
          ptr_t q = ptr_t'(32'(lp[i]) + 32'(off));           // p + off
          if (k >= 88) q = ptr_t'(32'(lp[i]) + 32'(SEG - 1 - (32'(lp[i].index))));  // near the end
          if (off > 0) n_ptrarith++;
          mem_op(k < 71, w, q, $urandom());
        end
      end else begin
        reg_op($urandom_range(1), width_e'($urandom_range(2)), $urandom_range(3), $urandom());
      end
    end

    for (int s = 0; s < NSEG; s++) begin
      $display("segment %0d: malloc=%0d free=%0d failed=%0d merge below=%0d above=%0d both=%0d",
               s, n_malloc[s], n_free[s], n_fail[s], n_mbelow[s], n_mabove[s], n_mboth[s]);
      check(n_malloc[s] > 0 && n_free[s] > 0 && n_fail[s] > 0, $sformatf("segment %0d mechanisms", s));
      if (s != 2) check(n_mbelow[s] > 0 && n_mabove[s] > 0 && n_mboth[s] > 0,
                        $sformatf("segment %0d merges", s));
    end
    $display("bad_free=%0d out_of_range=%0d reg_cast=%0d ptr_arith=%0d bad_tag=%0d checked_loads=%0d",
             n_badfree, n_oob, n_regcast, n_ptrarith, n_badtag, n_loads);
    check(n_badfree > 0 && n_oob > 0 && n_regcast > 0 && n_ptrarith > 0 && n_badtag > 0 && n_loads > 0,
          "access mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
