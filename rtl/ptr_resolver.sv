// ptr_resolver: the main module of a design whose pointers have been resolved
// into hardware. It executes pointer operations (malloc, free, load, store)
// one at a time over NSEG memory segments, each with its own RAM and its own
// allocator, plus one scalar register that pointers may also reference.
//
// A pointer is the 32-bit code of spc_pkg::ptr_t. Its tag chooses the
// location set:
//   tag 0 .. NSEG-1  memory segment <tag>: loads and stores go to RAM <tag>
//                    at byte offset index, free goes to allocator <tag>
//   tag NSEG         the 32-bit register (a variable whose address was taken);
//                    index 0..3 selects its bytes, most significant first, so
//                    a short load at index 0 reads its upper half
//   other tags       no location set: the command answers err
// malloc(seg, size) sends the size to allocator <seg> and builds the result
// pointer from the segment number (tag), the returned byte address (index)
// and the returned allocated-list slot (alloc_tag, used by the optimized
// general-purpose allocator and 0 for the others). free(p) sends p.index as
// the block address and p.alloc_tag as the slot to allocator <p.tag>; freeing
// the register is an error, as it is not heap storage.
//
// Interface: cmd/cmd_valid/cmd_ready take a command (valid-ready); res with
// res_valid high for one cycle answers it. Towards allocator i: alloc_req[i]
// is held until alloc_ready[i], then the module waits for alloc_rsp[i].valid.
// Towards RAM i: mem_req[i].en for one cycle, then the module waits for
// mem_rsp[i].valid.
//
// Timing: counted from the cycle in which the command is taken, a register
// load/store answers in cycle 2, a RAM access in cycle 4, and malloc/free in
// cycle 3 + L when the allocator takes the request at once and answers L
// cycles after taking it. The steering by tag follows the paper's branching on the pointer
// tag; the command set, the handshakes and the single register are this
// design's choices.
module ptr_resolver
  import spc_pkg::*;
#(
  parameter int unsigned NSEG = 3
) (
  input  logic       clk,
  input  logic       rst_n,

  input  cmd_t       cmd,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  output result_t    res,
  output logic       res_valid,

  output alloc_req_t alloc_req   [NSEG],
  input  logic       alloc_ready [NSEG],
  input  alloc_rsp_t alloc_rsp   [NSEG],

  output mem_req_t   mem_req [NSEG],
  input  mem_rsp_t   mem_rsp [NSEG],

  output logic [DATA_W-1:0] reg_value   // current value of the register
);

  localparam logic [TAG_W-1:0] REG_TAG = TAG_W'(NSEG);
  localparam int unsigned      SW      = (NSEG > 1) ? $clog2(NSEG) : 1;

  // the pointer code is one 32-bit word; the tag must be able to name every
  // segment and the register
  if ($bits(ptr_t) != PTR_W || NSEG + 1 > 2 ** TAG_W) begin : g_bad_config
    $error("ptr_resolver: pointer layout does not hold NSEG segments");
  end

  typedef enum logic [2:0] {
    S_IDLE,
    S_DECODE,
    S_ALLOC_REQ,
    S_ALLOC_WAIT,
    S_MEM_REQ,
    S_MEM_WAIT
  } state_e;

  state_e         state;
  cmd_t           c;
  logic [SW-1:0]  sel;          // segment being served
  logic [DATA_W-1:0] reg_q;

  assign cmd_ready = (state == S_IDLE);
  assign reg_value = reg_q;

  // which location set the latched command refers to
  logic [TAG_W-1:0] target;
  assign target = (c.op == CMD_MALLOC) ? c.seg : c.ptr.tag;

  // register access: byte lanes, most significant byte at index 0
  int unsigned       nbytes;
  logic              reg_in_range;
  logic [DATA_W-1:0] reg_rdata;
  logic [DATA_W-1:0] reg_wdata;
  always_comb begin
    nbytes       = width_bytes(c.width);
    reg_in_range = (32'(c.ptr.index) + nbytes) <= 4;
    reg_rdata    = '0;
    reg_wdata    = reg_q;
    for (int unsigned b = 0; b < 4; b++) begin
      if (b < nbytes && 32'(c.ptr.index) + b < 4) begin
        reg_rdata = (reg_rdata << 8) | DATA_W'(reg_q[8*(3 - (32'(c.ptr.index) + b)) +: 8]);
        reg_wdata[8*(3 - (32'(c.ptr.index) + b)) +: 8] = c.wdata[8*(nbytes-1-b) +: 8];
      end
    end
  end

  // steering towards the allocators and RAMs
  always_comb begin
    for (int i = 0; i < NSEG; i++) begin
      alloc_req[i] = '0;
      mem_req[i]   = '0;
      if (32'(sel) == i) begin
        if (state == S_ALLOC_REQ) begin
          alloc_req[i].valid   = 1'b1;
          alloc_req[i].op      = (c.op == CMD_MALLOC) ? ALLOC_MALLOC : ALLOC_FREE;
          alloc_req[i].size    = c.size;
          alloc_req[i].address = c.ptr.index;
          alloc_req[i].index   = c.ptr.alloc_tag;
        end
        if (state == S_MEM_REQ) begin
          mem_req[i].en    = 1'b1;
          mem_req[i].we    = (c.op == CMD_STORE);
          mem_req[i].width = c.width;
          mem_req[i].addr  = c.ptr.index;
          mem_req[i].wdata = c.wdata;
        end
      end
    end
  end

  logic       sel_ready;
  alloc_rsp_t sel_arsp;
  mem_rsp_t   sel_mrsp;
  always_comb begin
    sel_ready = 1'b0;
    sel_arsp  = '0;
    sel_mrsp  = '0;
    for (int i = 0; i < NSEG; i++) begin
      if (32'(sel) == i) begin
        sel_ready = alloc_ready[i];
        sel_arsp  = alloc_rsp[i];
        sel_mrsp  = mem_rsp[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      c         <= '0;
      sel       <= '0;
      reg_q     <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            c     <= cmd;
            state <= S_DECODE;
          end
        end

        S_DECODE: begin
          sel <= SW'(target);
          res <= '0;
          if (32'(target) < NSEG) begin
            state <= (c.op == CMD_MALLOC || c.op == CMD_FREE) ? S_ALLOC_REQ : S_MEM_REQ;
          end else if (target == REG_TAG && (c.op == CMD_LOAD || c.op == CMD_STORE)) begin
            // the register location set
            res_valid <= 1'b1;
            res.err   <= !reg_in_range;
            if (reg_in_range && c.op == CMD_STORE) reg_q <= reg_wdata;
            if (reg_in_range && c.op == CMD_LOAD)  res.rdata <= reg_rdata;
            state <= S_IDLE;
          end else begin
            res_valid <= 1'b1;
            res.err   <= 1'b1;
            state     <= S_IDLE;
          end
        end

        S_ALLOC_REQ: if (sel_ready) state <= S_ALLOC_WAIT;

        S_ALLOC_WAIT: begin
          if (sel_arsp.valid) begin
            res_valid <= 1'b1;
            res.err   <= sel_arsp.err;
            if (c.op == CMD_MALLOC && !sel_arsp.err)
              res.ptr <= '{alloc_tag: sel_arsp.index, tag: c.seg, index: sel_arsp.address};
            state <= S_IDLE;
          end
        end

        S_MEM_REQ: state <= S_MEM_WAIT;

        S_MEM_WAIT: begin
          if (sel_mrsp.valid) begin
            res_valid <= 1'b1;
            res.err   <= sel_mrsp.err;
            res.rdata <= sel_mrsp.rdata;
            state     <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  logic [NSEG-1:0] areq_v;
  always_comb for (int i = 0; i < NSEG; i++) areq_v[i] = alloc_req[i].valid;
  a_one_request : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(areq_v));

endmodule
