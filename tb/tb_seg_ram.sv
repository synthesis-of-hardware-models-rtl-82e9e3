// tb_seg_ram: self-checking testbench of the segment RAM. A byte array model
// is written and read with random char, short and int accesses at random
// offsets; reads must return the bytes most significant first, zero-extended,
// one cycle after the request, and accesses that run past the end must be
// refused without changing the contents.
module tb_seg_ram;
  import spc_pkg::*;

  localparam int unsigned SEG  = 32;
  localparam int unsigned NOPS = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t req;
  mem_rsp_t rsp;

  seg_ram #(.SEG_BYTES(SEG)) dut (.clk, .rst_n, .req, .rsp);

  int checks = 0, failures = 0, n_oob = 0, n_rd = 0, n_wr = 0;
  logic [7:0] model [SEG];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(bit we, width_e w, int unsigned a, logic [31:0] wd);
    int unsigned n = width_bytes(w);
    bit ok = (a + n) <= SEG;
    logic [31:0] exp = '0;
    req = '{en: 1'b1, we: we, width: w, addr: INDEX_W'(a), wdata: wd};
    @(posedge clk); #1;
    req = '0;
    check(rsp.valid, "response one cycle after the request");
    check(rsp.err == !ok, $sformatf("err=%0d at %0d+%0d", rsp.err, a, n));
    if (!ok) n_oob++;
    if (ok && we) begin
      n_wr++;
      for (int unsigned b = 0; b < n; b++) model[a + b] = wd[8*(n-1-b) +: 8];
    end
    if (ok && !we) begin
      n_rd++;
      for (int unsigned b = 0; b < n; b++) exp = (exp << 8) | 32'(model[a + b]);
      check(rsp.rdata == exp, $sformatf("read %h at %0d width %0d, expected %h",
                                        rsp.rdata, a, n, exp));
    end
    @(posedge clk); #1;
    check(!rsp.valid, "response lasts one cycle");
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // fill with known bytes, then check the byte order explicitly
    for (int unsigned a = 0; a < SEG; a += 4) access(1'b1, W_INT, a, 32'h01020304 + a * 32'h01010101);
    for (int n = 0; n < NOPS; n++) begin
      automatic width_e w = width_e'($urandom_range(2));
      access($urandom_range(1), w, $urandom_range(SEG + 2), $urandom());
    end
    $display("reads=%0d writes=%0d out_of_range=%0d", n_rd, n_wr, n_oob);
    check(n_oob > 0, "out-of-range accesses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
