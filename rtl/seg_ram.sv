// seg_ram: storage of one memory segment, a byte array of SEG_BYTES bytes in
// which one allocator places dynamically allocated blocks.
//
// Loads and stores of 1, 2 or 4 bytes may start at any byte offset. The data
// is laid out most significant byte first (the byte at the lowest offset is
// the top byte of a short or int), the layout the pointer type-casting rules
// assume: reading the int at offset a gives {m[a], m[a+1], m[a+2], m[a+3]}.
// Read and write data are right-aligned in the 32-bit word; a narrow load is
// zero-extended.
//
// Timing: a request (req.en) is served at the next clock edge; rsp.valid is
// high for one cycle after it, with rdata for a load. An access that runs past
// the last byte changes nothing and answers with rsp.err.
//
// The segment size default (32 bytes) is the segment size of the paper's
// malloc examples; byte addressing, byte order and the one-cycle response are
// this design's choices. No reset of the contents: like a RAM, it holds what
// was last written.
module seg_ram
  import spc_pkg::*;
#(
  parameter int unsigned SEG_BYTES = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output mem_rsp_t rsp
);

  logic [7:0] mem [SEG_BYTES];

  int unsigned nbytes;
  logic        in_range;
  logic [DATA_W-1:0] rd_word;

  always_comb begin
    nbytes   = width_bytes(req.width);
    in_range = (32'(req.addr) + nbytes) <= SEG_BYTES;
    rd_word  = '0;
    for (int unsigned b = 0; b < 4; b++) begin
      if (b < nbytes && 32'(req.addr) + b < SEG_BYTES)
        rd_word = (rd_word << 8) | DATA_W'(mem[32'(req.addr) + b]);
    end
  end

  always_ff @(posedge clk) begin
    if (req.en && req.we && in_range) begin
      for (int unsigned b = 0; b < 4; b++) begin
        if (b < nbytes)
          mem[32'(req.addr) + b] <= req.wdata[8*(nbytes-1-b) +: 8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= '0;
    end else begin
      rsp.valid <= req.en;
      rsp.err   <= req.en && !in_range;
      rsp.rdata <= (req.en && !req.we && in_range) ? rd_word : '0;
    end
  end

endmodule
