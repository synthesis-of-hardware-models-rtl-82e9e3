// sp_allocator: specific-purpose hardware memory allocator. When every malloc
// mapped to a memory segment asks for the same constant size K, the segment
// is an array of NUM_BLOCKS elements of K bytes (BLOCK_BYTES) and the
// allocator only has to remember which elements are in use: one bit each.
//
// malloc: the lowest free element is found by a priority search over the bit
// vector; its bit is set and its byte address (element * K) returned. The
// requested size is checked: a size other than 1..K answers rsp.err.
// free(address): the element is address / K; its bit is cleared. An address
// that is not the start of an element in use answers rsp.err.
// Because all blocks have one size, there is no fragmentation and no list to
// walk: every request is answered on the cycle after it is accepted.
// rsp.index is always 0: the element is found from the address alone.
//
// Timing: req_ready is high while no response is pending; rsp.valid pulses
// one cycle after each accepted request.
//
// From the paper: the bit vector, "first available element" and the address
// to element mapping, and 16 blocks (the block count of its allocator
// results). K defaults to 4 bytes, the constant size of the paper's example
// segment of 4-byte mallocs; the size check and error answers are this
// design's choices.
module sp_allocator
  import spc_pkg::*;
#(
  parameter int unsigned BLOCK_BYTES = 4,
  parameter int unsigned NUM_BLOCKS  = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  alloc_req_t req,
  output logic       req_ready,
  output alloc_rsp_t rsp
);

  localparam int unsigned SEG_BYTES = BLOCK_BYTES * NUM_BLOCKS;

  logic [NUM_BLOCKS-1:0] used;

  // lowest free element
  logic        any_free;
  int unsigned first_free;
  always_comb begin
    any_free   = 1'b0;
    first_free = 0;
    for (int i = NUM_BLOCKS - 1; i >= 0; i--) begin
      if (!used[i]) begin
        any_free   = 1'b1;
        first_free = i;
      end
    end
  end

  // element addressed by a free request
  int unsigned free_elem;
  logic        free_ok;
  always_comb begin
    free_elem = 32'(req.address) / BLOCK_BYTES;
    free_ok   = (32'(req.address) % BLOCK_BYTES == 0) &&
                (32'(req.address) < SEG_BYTES) &&
                used[free_elem % NUM_BLOCKS];
  end

  assign req_ready = !rsp.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
      rsp  <= '0;
    end else begin
      rsp <= '0;
      if (req.valid && req_ready) begin
        rsp.valid <= 1'b1;
        if (req.op == ALLOC_MALLOC) begin
          if (any_free && req.size != '0 && 32'(req.size) <= BLOCK_BYTES) begin
            used[first_free] <= 1'b1;
            rsp.address      <= INDEX_W'(first_free * BLOCK_BYTES);
          end else begin
            rsp.err <= 1'b1;
          end
        end else begin
          if (free_ok) begin
            used[free_elem % NUM_BLOCKS] <= 1'b0;
            rsp.address                  <= req.address;
          end else begin
            rsp.err <= 1'b1;
          end
        end
      end
    end
  end

endmodule
