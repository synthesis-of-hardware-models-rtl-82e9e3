// tb_ptr_resolver: self-checking testbench of the pointer-resolving main
// module, with simple models of three allocators and three segment RAMs
// written here. Each allocator model takes requests with a randomly varying
// ready, answers after a random delay with an address and slot derived from
// a counter, and records what it was asked; each RAM model records its
// request and answers with data computed from it. The testbench checks that
// every command reaches only the allocator or RAM named by the pointer tag
// (or the segment number for malloc), with the right fields; that malloc
// builds the pointer {slot, segment, address}; that the register location
// set is read and written byte-wise, most significant byte at index 0, as
// type-cast short and char accesses do; that unknown tags, freeing the
// register and out-of-range register accesses are refused; and the latency
// of register and RAM accesses.
module tb_ptr_resolver;
  import spc_pkg::*;

  localparam int NSEG = 3;
  localparam int NOPS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cmd_t       cmd;
  logic       cmd_valid, cmd_ready;
  result_t    res;
  logic       res_valid;
  alloc_req_t alloc_req   [NSEG];
  logic       alloc_ready [NSEG];
  alloc_rsp_t alloc_rsp   [NSEG];
  mem_req_t   mem_req     [NSEG];
  mem_rsp_t   mem_rsp     [NSEG];
  logic [31:0] reg_value;

  ptr_resolver #(.NSEG(NSEG)) dut (
    .clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .res, .res_valid,
    .alloc_req, .alloc_ready, .alloc_rsp, .mem_req, .mem_rsp, .reg_value
  );

  // what each model saw
  int         a_hits [NSEG];
  alloc_req_t a_last [NSEG];
  int         m_hits [NSEG];
  mem_req_t   m_last [NSEG];
  int         a_count [NSEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_models
    int unsigned delay;
    logic        busy;
    alloc_req_t  held;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        alloc_ready[s] <= 1'b0; alloc_rsp[s] <= '0; busy <= 1'b0; delay <= 0;
        a_hits[s] <= 0; m_hits[s] <= 0; a_count[s] <= 0; held <= '0;
        mem_rsp[s] <= '0; a_last[s] <= '0; m_last[s] <= '0;
      end else begin
        alloc_rsp[s] <= '0;
        if (!busy) alloc_ready[s] <= ($urandom_range(3) != 0);
        if (alloc_req[s].valid && alloc_ready[s] && !busy) begin
          busy <= 1'b1; alloc_ready[s] <= 1'b0;
          delay <= $urandom_range(4);
          held <= alloc_req[s];
          a_last[s] <= alloc_req[s];
          a_hits[s] <= a_hits[s] + 1;
        end else if (busy) begin
          if (delay == 0) begin
            busy <= 1'b0;
            alloc_rsp[s].valid   <= 1'b1;
            alloc_rsp[s].err     <= (held.op == ALLOC_MALLOC) && (held.size > 20);
            alloc_rsp[s].address <= INDEX_W'(a_count[s] * 4 + s);
            alloc_rsp[s].index   <= ALLOC_TAG_W'(a_count[s] + 16 * s);
            a_count[s] <= a_count[s] + 1;
          end else delay <= delay - 1;
        end
        // RAM model
        mem_rsp[s] <= '0;
        if (mem_req[s].en) begin
          m_hits[s] <= m_hits[s] + 1;
          m_last[s] <= mem_req[s];
          mem_rsp[s].valid <= 1'b1;
          mem_rsp[s].err   <= mem_req[s].addr > 100;
          mem_rsp[s].rdata <= mem_req[s].we ? '0 : {8'(s), 8'(mem_req[s].width), mem_req[s].addr};
        end
      end
    end
  end

  int checks = 0, failures = 0;
  int n_malloc = 0, n_free = 0, n_ramld = 0, n_ramst = 0, n_regld = 0, n_regst = 0, n_err = 0;
  logic [31:0] reg_model;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input cmd_t c, output result_t r, output int lat);
    int ah [NSEG], mh [NSEG];
    for (int i = 0; i < NSEG; i++) begin ah[i] = a_hits[i]; mh[i] = m_hits[i]; end
    cmd = c; cmd_valid = 1'b1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    lat = 1;
    while (!res_valid) begin @(posedge clk); #1; lat++; if (lat > 100) break; end
    r = res;
    // only the addressed model may have seen a request
    for (int i = 0; i < NSEG; i++) begin
      automatic int tgt = (c.op == CMD_MALLOC) ? int'(c.seg) : int'(c.ptr.tag);
      automatic bit is_alloc = (c.op == CMD_MALLOC || c.op == CMD_FREE);
      check(a_hits[i] - ah[i] == ((is_alloc && tgt == i) ? 1 : 0),
            $sformatf("allocator %0d hit count for op %0d tag %0d", i, c.op, tgt));
      check(m_hits[i] - mh[i] == ((!is_alloc && tgt == i) ? 1 : 0),
            $sformatf("RAM %0d hit count for op %0d tag %0d", i, c.op, tgt));
    end
  endtask

  function automatic cmd_t mk(cmd_op_e op, int seg, int size, width_e w, ptr_t p, logic [31:0] wd);
    cmd_t c;
    c.op = op; c.seg = TAG_W'(seg); c.size = SIZE_W'(size); c.width = w; c.ptr = p; c.wdata = wd;
    return c;
  endfunction

  task automatic t_malloc(int seg, int size);
    result_t r; int lat; int cnt;
    cnt = (seg < NSEG) ? a_count[seg] : 0;
    run(mk(CMD_MALLOC, seg, size, W_INT, '0, '0), r, lat);
    if (seg >= NSEG) begin
      n_err++; check(r.err, "malloc in a segment that does not exist must fail");
    end else begin
      n_malloc++;
      check(a_last[seg].op == ALLOC_MALLOC && 32'(a_last[seg].size) == size,
            "malloc request fields");
      check(r.err == (size > 20), "malloc error passed through");
      if (!r.err)
        check(r.ptr == '{alloc_tag: ALLOC_TAG_W'(cnt + 16 * seg), tag: TAG_W'(seg),
                         index: INDEX_W'(cnt * 4 + seg)},
              $sformatf("malloc pointer %h", r.ptr));
    end
  endtask

  task automatic t_free(ptr_t p);
    result_t r; int lat;
    run(mk(CMD_FREE, 0, 0, W_INT, p, '0), r, lat);
    if (32'(p.tag) >= NSEG) begin
      n_err++; check(r.err, "free of a non-heap location must fail");
    end else begin
      n_free++;
      check(a_last[p.tag].op == ALLOC_FREE && a_last[p.tag].address == p.index &&
            a_last[p.tag].index == p.alloc_tag, "free request carries index and alloc tag");
      check(!r.err, "free answered");
    end
  endtask

  task automatic t_mem(bit st, width_e w, ptr_t p, logic [31:0] wd);
    result_t r; int lat; int unsigned n = width_bytes(w);
    run(mk(st ? CMD_STORE : CMD_LOAD, 0, 0, w, p, wd), r, lat);
    if (32'(p.tag) < NSEG) begin
      if (st) n_ramst++; else n_ramld++;
      check(lat == 4, $sformatf("RAM access latency %0d", lat));
      check(m_last[p.tag].we == st && m_last[p.tag].width == w &&
            m_last[p.tag].addr == p.index && (!st || m_last[p.tag].wdata == wd),
            "RAM request fields");
      check(r.err == (p.index > 100), "RAM error passed through");
      if (!st && !r.err)
        check(r.rdata == {8'(p.tag), 8'(w), p.index}, "RAM data returned");
    end else if (32'(p.tag) == NSEG) begin
      bit ok = 32'(p.index) + n <= 4;
      check(lat == 2, $sformatf("register access latency %0d", lat));
      check(r.err == !ok, $sformatf("register access err at %0d width %0d", p.index, n));
      if (ok) begin
        logic [31:0] exp = '0;
        for (int unsigned b = 0; b < n; b++) begin
          int unsigned pos = 3 - (32'(p.index) + b);   // byte lane, 3 = top
          if (st) reg_model[8*pos +: 8] = wd[8*(n-1-b) +: 8];
          else    exp = (exp << 8) | 32'(reg_model[8*pos +: 8]);
        end
        if (st) n_regst++; else n_regld++;
        if (!st) check(r.rdata == exp, $sformatf("register load %h, expected %h", r.rdata, exp));
      end else n_err++;
      check(reg_value == reg_model, "register value");
    end else begin
      n_err++; check(r.err, "access through an unknown tag must fail");
    end
  endtask

  function automatic ptr_t rp(int tag_max, int idx_max);
    ptr_t p;
    p.alloc_tag = ALLOC_TAG_W'($urandom());
    p.tag       = TAG_W'($urandom_range(tag_max));
    p.index     = INDEX_W'($urandom_range(idx_max));
    return p;
  endfunction

  initial begin
    cmd = '0; cmd_valid = 1'b0; reg_model = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // type casting through the register: int store, short and char loads
    t_mem(1, W_INT,   '{alloc_tag: 0, tag: NSEG, index: 0}, 32'hAABBCCDD);
    t_mem(0, W_SHORT, '{alloc_tag: 0, tag: NSEG, index: 0}, '0);   // 0xAABB
    t_mem(0, W_SHORT, '{alloc_tag: 0, tag: NSEG, index: 2}, '0);   // 0xCCDD
    t_mem(1, W_SHORT, '{alloc_tag: 0, tag: NSEG, index: 2}, 32'h1122);
    t_mem(0, W_INT,   '{alloc_tag: 0, tag: NSEG, index: 0}, '0);   // 0xAABB1122
    check(reg_value == 32'hAABB1122, "short store into the low half of the int");
    t_mem(0, W_SHORT, '{alloc_tag: 0, tag: NSEG, index: 3}, '0);   // out of range
    for (int s = 0; s < NSEG + 1; s++) t_malloc(s, 4);
    t_free('{alloc_tag: 8'h05, tag: 1, index: 16'h0010});
    t_free('{alloc_tag: 0, tag: NSEG, index: 0});                  // the register
    for (int n = 0; n < NOPS; n++) begin
      automatic int k = $urandom_range(5);
      case (k)
        0: t_malloc($urandom_range(NSEG), $urandom_range(1, 24));
        1: t_free(rp(NSEG + 1, 40));
        2, 3: t_mem(0, width_e'($urandom_range(2)), rp(NSEG + 1, 110), '0);
        default: t_mem(1, width_e'($urandom_range(2)), rp(NSEG + 1, 110), $urandom());
      endcase
    end
    $display("malloc=%0d free=%0d ram_ld=%0d ram_st=%0d reg_ld=%0d reg_st=%0d refused=%0d",
             n_malloc, n_free, n_ramld, n_ramst, n_regld, n_regst, n_err);
    check(n_malloc > 0 && n_free > 0 && n_ramld > 0 && n_ramst > 0 && n_regld > 0 &&
          n_regst > 0 && n_err > 0, "every kind of command seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
