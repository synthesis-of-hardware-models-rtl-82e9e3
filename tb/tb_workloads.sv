// tb_workloads: runs, on the whole design at its default sizes, the
// allocation patterns of the four evaluated programs, as far as they are
// specified, with the program itself played by this testbench through the
// command port:
//   test1  three mallocs of one constant size (4 bytes) and two frees, in the
//          specific-purpose segment, then in each general-purpose segment
//   test2  the same, with one of the mallocs inside a loop whose block is
//          freed in the same iteration (64 iterations)
//   jpeg   Y[i] = clip(A*X[i] + B, C) for i = 1..n with X and Y two
//          dynamically allocated 3 x n int matrices (n = 2, the largest that
//          fits a 32-byte segment: 3*2*4 = 24 bytes each); X in segment 0, Y
//          in segment 1; A, B, C are test constants and clip limits to 0..C
//   ATM    for each frame from the host a queue element (8 bytes: length and
//          cell count) in segment 1 and a connection status record (4 bytes)
//          in segment 2 are allocated; the frame is cut into 48-byte cell
//          payloads, counted in the record; the queue element is freed when
//          the frame is sent. Frames arrive until a malloc is refused.
// Every store is read back through the pointer; every malloc result must be
// a pointer into the requested segment, distinct from all live blocks.
module tb_workloads;
  import spc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cmd_t        cmd;
  logic        cmd_valid, cmd_ready;
  result_t     res;
  logic        res_valid;
  logic [31:0] reg_value;

  spc_system dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .res, .res_valid, .reg_value);

  int checks = 0, failures = 0;
  int n_test1 = 0, n_test2_loop = 0, n_jpeg = 0, n_atm_frames = 0, n_atm_cells = 0, n_atm_full = 0;

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

  task automatic malloc(int seg, int size, output ptr_t p, output bit ok);
    result_t r; cmd_t c = '0;
    c.op = CMD_MALLOC; c.seg = TAG_W'(seg); c.size = SIZE_W'(size);
    run(c, r);
    p = r.ptr; ok = !r.err;
    if (ok) check(p.tag == TAG_W'(seg) && 32'(p.index) + size <= 32, "pointer into the segment");
  endtask

  task automatic free(ptr_t p);
    result_t r; cmd_t c = '0;
    c.op = CMD_FREE; c.ptr = p;
    run(c, r);
    check(!r.err, $sformatf("free(%h)", p));
  endtask

  task automatic store(ptr_t p, int off, logic [31:0] v);
    result_t r; cmd_t c = '0;
    c.op = CMD_STORE; c.width = W_INT; c.ptr = ptr_t'(32'(p) + 32'(off)); c.wdata = v;
    run(c, r);
    check(!r.err, "store");
  endtask

  task automatic load(ptr_t p, int off, output logic [31:0] v);
    result_t r; cmd_t c = '0;
    c.op = CMD_LOAD; c.width = W_INT; c.ptr = ptr_t'(32'(p) + 32'(off));
    run(c, r);
    check(!r.err, "load");
    v = r.rdata;
  endtask

  function automatic bit disjoint(ptr_t a, int sa, ptr_t b, int sb);
    return a.tag != b.tag || 32'(a.index) + sa <= 32'(b.index) || 32'(b.index) + sb <= 32'(a.index);
  endfunction

  // test1 / test2: three mallocs of 4 bytes, two frees (loop for test2)
  task automatic test12(int seg, bit with_loop);
    ptr_t p [3]; bit ok; logic [31:0] v;
    for (int i = 0; i < 3; i++) begin
      malloc(seg, 4, p[i], ok);
      check(ok, "test malloc");
      store(p[i], 0, 32'hC0DE_0000 + 32'(i));
      for (int j = 0; j < i; j++) check(disjoint(p[i], 4, p[j], 4), "blocks do not overlap");
    end
    if (with_loop) begin
      for (int n = 0; n < 64; n++) begin
        ptr_t q;
        malloc(seg, 4, q, ok);
        check(ok, "loop malloc");
        store(q, 0, 32'(n));
        load(q, 0, v);
        check(v == 32'(n), "loop block data");
        free(q);
        n_test2_loop++;
      end
    end
    for (int i = 0; i < 3; i++) begin
      load(p[i], 0, v);
      check(v == 32'hC0DE_0000 + 32'(i), "test block data kept");
    end
    free(p[0]); free(p[1]);
    // the remaining block stays live; free it so later workloads start clean
    free(p[2]);
    n_test1++;
  endtask

  // jpeg colour transform
  localparam int N = 2;
  int A [3][3] = '{'{77, 150, 29}, '{-43, -85, 128}, '{128, -107, -21}};
  int B [3]    = '{0, 128 * 256, 128 * 256};
  int C        = 255 * 256;

  task automatic jpeg();
    ptr_t X, Y; bit ok; logic [31:0] v;
    int xs [3][N];
    malloc(0, 3 * N * 4, X, ok); check(ok, "malloc X");
    malloc(1, 3 * N * 4, Y, ok); check(ok, "malloc Y");
    for (int i = 0; i < N; i++)
      for (int r = 0; r < 3; r++) begin
        xs[r][i] = $urandom_range(255);
        store(X, (i * 3 + r) * 4, 32'(xs[r][i]));
      end
    for (int i = 0; i < N; i++)
      for (int r = 0; r < 3; r++) begin
        int acc = B[r];
        for (int k = 0; k < 3; k++) begin
          load(X, (i * 3 + k) * 4, v);
          acc += A[r][k] * int'(v);
        end
        if (acc < 0) acc = 0;
        if (acc > C) acc = C;
        store(Y, (i * 3 + r) * 4, 32'(acc));
      end
    for (int i = 0; i < N; i++)
      for (int r = 0; r < 3; r++) begin
        int exp = B[r];
        for (int k = 0; k < 3; k++) exp += A[r][k] * xs[k][i];
        if (exp < 0) exp = 0;
        if (exp > C) exp = C;
        load(Y, (i * 3 + r) * 4, v);
        check(int'(v) == exp, $sformatf("Y[%0d][%0d] = %0d, expected %0d", r, i, v, exp));
      end
    free(X); free(Y);
    n_jpeg++;
  endtask

  // ATM segmentation
  task automatic atm();
    ptr_t rec [16]; int nrec = 0; bit ok, ok2; logic [31:0] v, cnt_exp;
    forever begin
      ptr_t q, r;
      int len = $urandom_range(1, 400);
      malloc(1, 8, q, ok);
      malloc(2, 4, r, ok2);
      if (!ok || !ok2) begin
        if (ok) free(q);
        n_atm_full++;
        break;
      end
      rec[nrec] = r; nrec++;
      store(q, 0, 32'(len));
      store(q, 4, 32'((len + 47) / 48));
      store(r, 0, 0);
      // send cells: one 48-byte payload per step
      load(q, 0, v);
      while (int'(v) > 0) begin
        logic [31:0] cnt;
        load(r, 0, cnt);
        store(r, 0, cnt + 1);
        n_atm_cells++;
        v = (int'(v) > 48) ? v - 48 : 0;
        store(q, 0, v);
      end
      load(r, 0, v);
      load(q, 4, cnt_exp);
      check(v == cnt_exp, $sformatf("cells sent %0d, expected %0d", v, cnt_exp));
      free(q);
      n_atm_frames++;
    end
    check(nrec == 8, $sformatf("connection records until the segment is full: %0d", nrec));
    for (int i = 0; i < nrec; i++) free(rec[i]);
  endtask

  initial begin
    cmd = '0; cmd_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    test12(2, 0); test12(0, 0); test12(1, 0);
    test12(2, 1); test12(0, 1); test12(1, 1);
    for (int i = 0; i < 5; i++) jpeg();
    atm();
    $display("test runs=%0d test2 loop iterations=%0d jpeg runs=%0d atm frames=%0d cells=%0d refusals=%0d",
             n_test1, n_test2_loop, n_jpeg, n_atm_frames, n_atm_cells, n_atm_full);
    check(n_test1 == 6 && n_test2_loop > 0 && n_jpeg > 0 && n_atm_frames > 0 && n_atm_full == 1,
          "every workload ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
