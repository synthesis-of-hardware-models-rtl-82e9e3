// gp_allocator: general-purpose hardware memory allocator for one memory
// segment of SEG_BYTES bytes. It serves malloc (blocks of any size) and free
// for the segment, with the interface malloc_size -> malloc_address and
// free_address.
//
// Inside are two tables of registers:
//   allocated list  MAX_BLOCKS slots of {valid, address, size}, one per live
//                   block
//   free list       MAX_BLOCKS+1 slots of {valid, address, size}, one per
//                   free region; adjacent free regions are always merged, so
//                   there are never more free regions than live blocks + 1
// malloc(size): first an empty slot of the allocated list is looked for, then
// the whole free list is walked and, of the regions large enough, the one at
// the lowest address is taken (first fit in address order). The block is cut
// from the start of that region and its byte address is returned.
// free(address): the allocated list is searched, one slot per cycle, for the
// block starting at that address; the block is then merged with the free
// regions that end where it starts or start where it ends, and written back
// into the free list.
//
// Timing: one table entry is visited per clock cycle. malloc takes 3 +
// (position of the first empty allocated-list slot) + (MAX_BLOCKS+1) cycles
// from acceptance to response; free takes 3 + (position of the block in the
// allocated list) + (MAX_BLOCKS+1) cycles. The search is what the optimized
// allocator (ogp_allocator) removes. req_ready is high only while idle;
// rsp.valid pulses once per accepted request. malloc of size 0, a full
// allocated list or no large enough region answer rsp.err; free of an address
// that is not the start of a live block answers rsp.err and changes nothing.
// rsp.index is always 0 (the plain pointer code carries no allocation tag).
//
// From the paper: the two lists, first fit, the search of the allocated list
// on free and merging of adjacent free blocks; 16 blocks and 32-byte segments
// are the paper's sizes. The table layout, the one-entry-per-cycle walk, the
// handshake and the error answers are this design's choices.
module gp_allocator
  import spc_pkg::*;
#(
  parameter int unsigned SEG_BYTES  = 32,
  parameter int unsigned MAX_BLOCKS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  alloc_req_t req,
  output logic       req_ready,
  output alloc_rsp_t rsp
);

  localparam int unsigned FREE_SLOTS = MAX_BLOCKS + 1;
  localparam int unsigned AW = $clog2(MAX_BLOCKS);
  localparam int unsigned FW = $clog2(FREE_SLOTS);

  typedef struct packed {
    logic               valid;
    logic [INDEX_W-1:0] addr;
    logic [SIZE_W-1:0]  size;
  } entry_t;

  typedef enum logic [2:0] {
    S_IDLE,
    S_SLOT,     // malloc: find an empty allocated-list slot
    S_FIT,      // malloc: walk the free list for the first fit
    S_TAKE,     // malloc: cut the block from the chosen region
    S_SEARCH,   // free: search the allocated list for the address
    S_MERGE,    // free: walk the free list, merge neighbours
    S_INSERT    // free: write the merged region back
  } state_e;

  entry_t alloc_list [MAX_BLOCKS];
  entry_t free_list  [FREE_SLOTS];

  state_e             state;
  logic [FW-1:0]      cnt;
  logic [AW-1:0]      slot;
  logic [SIZE_W-1:0]  want;
  logic [INDEX_W-1:0] faddr;
  entry_t             cur;        // region being freed, grows while merging
  logic               fit_found;
  logic [FW-1:0]      fit;        // free-list slot of the lowest fitting region
  logic               have_hole;
  logic [FW-1:0]      hole;       // first empty free-list slot seen

  assign req_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      slot      <= '0;
      want      <= '0;
      faddr     <= '0;
      cur       <= '0;
      fit_found <= 1'b0;
      fit       <= '0;
      have_hole <= 1'b0;
      hole      <= '0;
      rsp       <= '0;
      for (int i = 0; i < MAX_BLOCKS; i++) alloc_list[i] <= '0;
      for (int i = 0; i < FREE_SLOTS; i++) free_list[i] <= '0;
      free_list[0] <= '{valid: 1'b1, addr: '0, size: SIZE_W'(SEG_BYTES)};
    end else begin
      rsp <= '0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (req.valid) begin
            want  <= req.size;
            faddr <= req.address;
            if (req.op == ALLOC_MALLOC) begin
              if (req.size == '0) begin
                rsp <= '{valid: 1'b1, err: 1'b1, address: '0, index: '0};
              end else begin
                state <= S_SLOT;
              end
            end else begin
              state <= S_SEARCH;
            end
          end
        end

        S_SLOT: begin
          if (!alloc_list[AW'(cnt)].valid) begin
            slot      <= AW'(cnt);
            cnt       <= '0;
            fit_found <= 1'b0;
            state     <= S_FIT;
          end else if (32'(cnt) == MAX_BLOCKS - 1) begin
            rsp   <= '{valid: 1'b1, err: 1'b1, address: '0, index: '0};
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        S_FIT: begin
          // keep the lowest-addressed region that is large enough
          if (free_list[cnt].valid && free_list[cnt].size >= want &&
              (!fit_found || free_list[cnt].addr < free_list[fit].addr)) begin
            fit_found <= 1'b1;
            fit       <= cnt;
          end
          if (32'(cnt) == FREE_SLOTS - 1) state <= S_TAKE;
          else cnt <= cnt + 1'b1;
        end

        S_TAKE: begin
          if (fit_found) begin
            alloc_list[slot] <= '{valid: 1'b1, addr: free_list[fit].addr, size: want};
            free_list[fit].addr  <= free_list[fit].addr + INDEX_W'(want);
            free_list[fit].size  <= free_list[fit].size - want;
            free_list[fit].valid <= (free_list[fit].size != want);
            rsp <= '{valid: 1'b1, err: 1'b0, address: free_list[fit].addr,
                     index: '0};
          end else begin
            rsp <= '{valid: 1'b1, err: 1'b1, address: '0, index: '0};
          end
          state <= S_IDLE;
        end

        S_SEARCH: begin
          if (alloc_list[AW'(cnt)].valid && alloc_list[AW'(cnt)].addr == faddr) begin
            cur <= alloc_list[AW'(cnt)];
            alloc_list[AW'(cnt)].valid <= 1'b0;
            have_hole <= 1'b0;
            cnt   <= '0;
            state <= S_MERGE;
          end else if (32'(cnt) == MAX_BLOCKS - 1) begin
            rsp   <= '{valid: 1'b1, err: 1'b1, address: '0, index: '0};
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        S_MERGE: begin
          if (free_list[cnt].valid &&
              free_list[cnt].addr + INDEX_W'(free_list[cnt].size) == cur.addr) begin
            // free region just below: grow downwards, release its slot
            cur.addr <= free_list[cnt].addr;
            cur.size <= cur.size + free_list[cnt].size;
            free_list[cnt].valid <= 1'b0;
            if (!have_hole) begin have_hole <= 1'b1; hole <= cnt; end
          end else if (free_list[cnt].valid &&
                       cur.addr + INDEX_W'(cur.size) == free_list[cnt].addr) begin
            // free region just above: grow upwards, release its slot
            cur.size <= cur.size + free_list[cnt].size;
            free_list[cnt].valid <= 1'b0;
            if (!have_hole) begin have_hole <= 1'b1; hole <= cnt; end
          end else if (!free_list[cnt].valid) begin
            if (!have_hole) begin have_hole <= 1'b1; hole <= cnt; end
          end
          if (32'(cnt) == FREE_SLOTS - 1) state <= S_INSERT;
          else cnt <= cnt + 1'b1;
        end

        S_INSERT: begin
          free_list[hole] <= '{valid: 1'b1, addr: cur.addr, size: cur.size};
          rsp   <= '{valid: 1'b1, err: 1'b0, address: faddr, index: '0};
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A free region never overlaps the one being released while merging, so at
  // most one neighbour below and one above exist; the free list always has a
  // hole for the merged region (at most live blocks + 1 regions exist).
  a_hole_found : assert property (@(posedge clk) disable iff (!rst_n)
                                  state == S_INSERT |-> have_hole);
  a_rsp_from_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                  rsp.valid |-> state == S_IDLE);

endmodule
