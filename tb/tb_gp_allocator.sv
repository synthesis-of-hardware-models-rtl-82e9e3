// tb_gp_allocator: self-checking testbench of the general-purpose allocator.
// A byte-occupancy model of the segment predicts every answer: malloc returns
// the lowest-addressed free region large enough (free regions are maximal
// runs of free bytes), or an error when the allocated list is full or no
// region fits; free by address releases the block, and an address that is
// not the start of a live block is refused. The model also tracks which
// allocated-list slot holds each block, which fixes the latency of every
// request (malloc: 3 + first empty slot + MAX_BLOCKS+1 cycles; free: 3 +
// slot of the block + MAX_BLOCKS+1 cycles, the search the optimized
// allocator avoids). Merges with a neighbour below, above, or on both sides
// are counted.
module tb_gp_allocator;
  import spc_pkg::*;

  localparam int unsigned SEG   = 32;
  localparam int unsigned MAXB  = 16;
  localparam int unsigned NOPS  = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  alloc_req_t req;
  logic       req_ready;
  alloc_rsp_t rsp;

  gp_allocator #(.SEG_BYTES(SEG), .MAX_BLOCKS(MAXB)) dut (
    .clk, .rst_n, .req, .req_ready, .rsp
  );

  int checks = 0, failures = 0;
  int n_merge_below = 0, n_merge_above = 0, n_merge_both = 0;
  int n_nofit = 0, n_full = 0, n_bad_free = 0, n_malloc = 0, n_free = 0;

  // reference model
  bit          used  [SEG];
  bit          live  [MAXB];
  int unsigned baddr [MAXB];
  int unsigned bsize [MAXB];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // issue a request, wait for the answer, return it and the latency in cycles
  task automatic do_req(input alloc_op_e op, input int unsigned size,
                        input int unsigned addr, input int unsigned idx,
                        output alloc_rsp_t r, output int lat);
    req = '{valid: 1'b1, op: op, size: SIZE_W'(size), address: INDEX_W'(addr),
            index: ALLOC_TAG_W'(idx)};
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk);           // accepted here
    #1 req = '0;
    lat = 1;
    while (!rsp.valid) begin
      @(posedge clk); #1;
      lat++;
    end
    r = rsp;
  endtask

  function automatic int model_fit(int unsigned size);
    for (int unsigned a = 0; a < SEG; a++) begin
      if (!used[a] && (a == 0 || used[a-1])) begin
        int unsigned len = 0;
        while (a + len < SEG && !used[a+len]) len++;
        if (len >= size) return int'(a);
      end
    end
    return -1;
  endfunction

  function automatic int first_empty_slot();
    for (int i = 0; i < MAXB; i++) if (!live[i]) return i;
    return -1;
  endfunction

  task automatic do_malloc(int unsigned size);
    alloc_rsp_t r; int lat; int exp_addr, exp_slot;
    exp_slot = first_empty_slot();
    exp_addr = model_fit(size);
    do_req(ALLOC_MALLOC, size, 0, 0, r, lat);
    if (exp_slot < 0) begin
      n_full++;
      check(r.err, "malloc with full allocated list must fail");
      check(lat == 1 + MAXB, $sformatf("full-list malloc latency %0d", lat));
    end else if (exp_addr < 0) begin
      n_nofit++;
      check(r.err, $sformatf("malloc(%0d) without fitting region must fail", size));
      check(lat == 3 + exp_slot + MAXB + 1, $sformatf("malloc latency %0d", lat));
    end else begin
      n_malloc++;
      check(!r.err, $sformatf("malloc(%0d) refused", size));
      check(32'(r.address) == exp_addr,
            $sformatf("malloc(%0d) address %0d, expected %0d", size, r.address, exp_addr));
      check(r.index == '0, "plain allocator returns no allocation tag");
      check(lat == 3 + exp_slot + MAXB + 1,
            $sformatf("malloc latency %0d, expected %0d", lat, 3 + exp_slot + MAXB + 1));
      if (!r.err) begin
        live[exp_slot]  = 1; baddr[exp_slot] = exp_addr; bsize[exp_slot] = size;
        for (int unsigned b = 0; b < size; b++) used[exp_addr + b] = 1;
      end
    end
  endtask

  task automatic do_free(int slot);
    alloc_rsp_t r; int lat; bit below, above;
    int unsigned a = baddr[slot], s = bsize[slot];
    below = (a > 0) && !used[a-1];
    above = (a + s < SEG) && !used[a+s];
    do_req(ALLOC_FREE, 0, a, $urandom_range(255), r, lat);
    n_free++;
    check(!r.err, $sformatf("free of slot %0d refused", slot));
    check(lat == 3 + slot + MAXB + 1,
          $sformatf("free latency %0d, expected %0d", lat, 3 + slot + MAXB + 1));
    live[slot] = 0;
    for (int unsigned b = 0; b < s; b++) used[a + b] = 0;
    if (below && above) n_merge_both++;
    else if (below) n_merge_below++;
    else if (above) n_merge_above++;
  endtask

  // a free of an address where no live block starts is refused after a
  // search of the whole allocated list
  task automatic do_bad_free();
    alloc_rsp_t r; int lat; int unsigned a; bit starts;
    a = $urandom_range(SEG - 1);
    starts = 0;
    for (int i = 0; i < MAXB; i++) if (live[i] && baddr[i] == a) starts = 1;
    if (starts) return;
    do_req(ALLOC_FREE, 0, a, 0, r, lat);
    n_bad_free++;
    check(r.err, $sformatf("free of address %0d (no block) must fail", a));
    check(lat == 1 + MAXB, $sformatf("failed free latency %0d", lat));
  endtask

  initial begin
    req = '0;
    for (int i = 0; i < SEG; i++) used[i] = 0;
    for (int i = 0; i < MAXB; i++) begin live[i] = 0; baddr[i] = 0; bsize[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // directed: fill with 2-byte blocks (16 of them fill 32 bytes and the list)
    for (int i = 0; i < 16; i++) do_malloc(2);
    do_malloc(1);                       // allocated list full
    do_free(3); do_free(5);             // two separate holes
    do_free(4);                         // merges with both neighbours
    do_malloc(6);                       // fits exactly the merged hole
    do_free(0); do_free(1);             // merge above (block 1 after 0)
    do_malloc(8);                       // no 8-byte hole: fails
    // random traffic
    for (int n = 0; n < NOPS; n++) begin
      automatic int k = $urandom_range(9);
      if (k < 5) do_malloc($urandom_range(1, 9));
      else if (k < 9) begin
        automatic int slot = $urandom_range(MAXB - 1);
        if (live[slot]) do_free(slot);
      end else do_bad_free();
    end
    $display("mallocs=%0d frees=%0d merge_below=%0d merge_above=%0d merge_both=%0d nofit=%0d full=%0d bad_free=%0d",
             n_malloc, n_free, n_merge_below, n_merge_above, n_merge_both, n_nofit, n_full, n_bad_free);
    check(n_merge_below > 0 && n_merge_above > 0 && n_merge_both > 0, "all merge cases seen");
    check(n_nofit > 0 && n_full > 0 && n_bad_free > 0, "all refusal cases seen");
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
