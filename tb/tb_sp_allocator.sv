// tb_sp_allocator: self-checking testbench of the specific-purpose allocator.
// A model bit vector predicts each answer: malloc returns the lowest free
// element times the block size, or an error when all elements are used or
// the size is 0 or above the block size; free of an element start in use
// releases it, any other address is refused. Every answer must come exactly
// one cycle after the request is taken.
module tb_sp_allocator;
  import spc_pkg::*;

  localparam int unsigned K    = 4;
  localparam int unsigned NB   = 16;
  localparam int unsigned NOPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  alloc_req_t req;
  logic       req_ready;
  alloc_rsp_t rsp;

  sp_allocator #(.BLOCK_BYTES(K), .NUM_BLOCKS(NB)) dut (
    .clk, .rst_n, .req, .req_ready, .rsp
  );

  int checks = 0, failures = 0;
  int n_malloc = 0, n_free = 0, n_full = 0, n_badsize = 0, n_badfree = 0;
  bit used [NB];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_req(input alloc_op_e op, input int unsigned size,
                        input int unsigned addr, output alloc_rsp_t r, output int lat);
    req = '{valid: 1'b1, op: op, size: SIZE_W'(size), address: INDEX_W'(addr), index: '0};
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    #1 req = '0;
    lat = 1;
    while (!rsp.valid) begin @(posedge clk); #1; lat++; end
    r = rsp;
  endtask

  task automatic do_malloc(int unsigned size);
    alloc_rsp_t r; int lat; int e = -1;
    for (int i = NB - 1; i >= 0; i--) if (!used[i]) e = i;
    do_req(ALLOC_MALLOC, size, 0, r, lat);
    check(lat == 1, $sformatf("malloc latency %0d", lat));
    if (size == 0 || size > K) begin
      n_badsize++;
      check(r.err, $sformatf("malloc(%0d) must fail", size));
    end else if (e < 0) begin
      n_full++;
      check(r.err, "malloc on a full segment must fail");
    end else begin
      n_malloc++;
      check(!r.err && 32'(r.address) == e * K,
            $sformatf("malloc address %0d, expected %0d", r.address, e * K));
      used[e] = 1;
    end
  endtask

  task automatic do_free(int unsigned addr);
    alloc_rsp_t r; int lat; bit ok;
    ok = (addr % K == 0) && (addr < K * NB) && used[(addr / K) % NB];
    do_req(ALLOC_FREE, 0, addr, r, lat);
    check(lat == 1, $sformatf("free latency %0d", lat));
    check(r.err == !ok, $sformatf("free(%0d) err=%0d, expected %0d", addr, r.err, !ok));
    if (ok) begin n_free++; used[addr / K] = 0; end
    else n_badfree++;
  endtask

  initial begin
    req = '0;
    for (int i = 0; i < NB; i++) used[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < NB + 1; i++) do_malloc(K);   // last one: full
    do_free(5 * K); do_free(2 * K);
    do_malloc(1);                                    // reuses element 2
    do_malloc(0); do_malloc(K + 1);                  // size refused
    do_free(5 * K); do_free(5 * K);                  // second is a double free
    do_free(3);                                      // not an element start
    for (int n = 0; n < NOPS; n++) begin
      automatic int k = $urandom_range(9);
      if (k < 5) do_malloc($urandom_range(0, K + 1));
      else if (k < 9) do_free($urandom_range(NB - 1) * K);
      else do_free($urandom_range(K * NB + 8));
    end
    $display("mallocs=%0d frees=%0d full=%0d badsize=%0d badfree=%0d",
             n_malloc, n_free, n_full, n_badsize, n_badfree);
    check(n_full > 0 && n_badsize > 0 && n_badfree > 0, "all refusal cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
