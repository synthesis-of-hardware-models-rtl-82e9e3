// spc_system: hardware for C code with pointers and malloc/free whose heap has
// been split into memory segments. Each segment has its own RAM and its own
// allocator, so allocations in different segments are independent, and a
// main module resolves every pointer by its tag to the segment (or register)
// it references.
//
// Structure:
//   ptr_resolver   main module: executes malloc / free / load / store
//   segment 0      seg_ram + gp_allocator  (general-purpose, free by search)
//   segment 1      seg_ram + ogp_allocator (optimized general-purpose, free
//                  by the allocation tag carried in the pointer)
//   segment 2      seg_ram + sp_allocator  (specific-purpose, blocks of
//                  SP_BLOCK_BYTES bytes only)
//   tag 3          a 32-bit register that pointers may reference
// Pointer code (spc_pkg::ptr_t): alloc_tag[31:24] | tag[23:16] | index[15:0].
//
// Interface: a command (cmd_t: op, seg, size, width, ptr, wdata) is taken when
// cmd_valid and cmd_ready are high; res_valid pulses once with the result
// (new pointer for malloc, data for load, err for any refused command).
// reg_value shows the register. Latency: see ptr_resolver and the allocators.
//
// The arrangement of one RAM and one allocator per segment around a main
// module is the paper's architecture for several segments (it draws two);
// three segments, one per allocator kind of its library, are this design's
// choice so that every allocator kind is present. The segment size (32 bytes)
// is the paper's example size; 16 blocks per general-purpose allocator is
// its allocator size.
module spc_system
  import spc_pkg::*;
#(
  parameter int unsigned SEG_BYTES      = 32,
  parameter int unsigned MAX_BLOCKS     = 16,
  parameter int unsigned SP_BLOCK_BYTES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cmd_t              cmd,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  output result_t           res,
  output logic              res_valid,
  output logic [DATA_W-1:0] reg_value
);

  localparam int unsigned NSEG = 3;

  alloc_req_t alloc_req   [NSEG];
  logic       alloc_ready [NSEG];
  alloc_rsp_t alloc_rsp   [NSEG];
  mem_req_t   mem_req     [NSEG];
  mem_rsp_t   mem_rsp     [NSEG];

  ptr_resolver #(.NSEG(NSEG)) u_main (
    .clk, .rst_n,
    .cmd, .cmd_valid, .cmd_ready,
    .res, .res_valid,
    .alloc_req, .alloc_ready, .alloc_rsp,
    .mem_req, .mem_rsp,
    .reg_value
  );

  for (genvar s = 0; s < NSEG; s++) begin : g_ram
    seg_ram #(.SEG_BYTES(SEG_BYTES)) u_ram (
      .clk, .rst_n, .req(mem_req[s]), .rsp(mem_rsp[s])
    );
  end

  gp_allocator #(.SEG_BYTES(SEG_BYTES), .MAX_BLOCKS(MAX_BLOCKS)) u_alloc_gp (
    .clk, .rst_n, .req(alloc_req[0]), .req_ready(alloc_ready[0]), .rsp(alloc_rsp[0])
  );

  ogp_allocator #(.SEG_BYTES(SEG_BYTES), .MAX_BLOCKS(MAX_BLOCKS)) u_alloc_ogp (
    .clk, .rst_n, .req(alloc_req[1]), .req_ready(alloc_ready[1]), .rsp(alloc_rsp[1])
  );

  sp_allocator #(.BLOCK_BYTES(SP_BLOCK_BYTES),
                 .NUM_BLOCKS(SEG_BYTES / SP_BLOCK_BYTES)) u_alloc_sp (
    .clk, .rst_n, .req(alloc_req[2]), .req_ready(alloc_ready[2]), .rsp(alloc_rsp[2])
  );

endmodule
