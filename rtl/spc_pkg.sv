// spc_pkg: types and constants shared by the pointer-resolving main module,
// the memory-segment RAMs and the hardware memory allocators.
//
// A pointer is a 32-bit code made of three fields, most significant first:
//   alloc_tag (8 bits)  slot of the block in the allocated-block list of an
//                       optimized general-purpose allocator (0 otherwise)
//   tag       (8 bits)  which location set (memory segment or register) the
//                       pointer references
//   index     (16 bits) byte offset of the referenced data inside that set
// Because the index sits in the low bits, pointer arithmetic (p + 4) is a
// plain 32-bit addition. The field widths follow the three-field layout used
// with the optimized general-purpose allocator; the plain two-field layout
// (16-bit tag, 16-bit index) is the same code with alloc_tag kept at zero.
//
// Allocators and the main module talk over a request/response handshake:
// a request is taken when valid and ready are both high, and exactly one
// response pulse (rsp.valid for one cycle) follows for each taken request.
package spc_pkg;

  localparam int unsigned PTR_W       = 32;
  localparam int unsigned ALLOC_TAG_W = 8;
  localparam int unsigned TAG_W       = 8;
  localparam int unsigned INDEX_W     = 16;
  localparam int unsigned SIZE_W      = 16;
  localparam int unsigned DATA_W      = 32;

  typedef struct packed {
    logic [ALLOC_TAG_W-1:0] alloc_tag;
    logic [TAG_W-1:0]       tag;
    logic [INDEX_W-1:0]     index;
  } ptr_t;

  // Operation requested from an allocator (malloc or free share one block).
  typedef enum logic {
    ALLOC_MALLOC = 1'b0,
    ALLOC_FREE   = 1'b1
  } alloc_op_e;

  typedef struct packed {
    logic                   valid;
    alloc_op_e              op;
    logic [SIZE_W-1:0]      size;      // malloc: number of bytes
    logic [INDEX_W-1:0]     address;   // free: first byte of the block
    logic [ALLOC_TAG_W-1:0] index;     // free: allocated-list slot (optimized)
  } alloc_req_t;

  typedef struct packed {
    logic                   valid;     // one-cycle response pulse
    logic                   err;       // no room (malloc) / unknown block (free)
    logic [INDEX_W-1:0]     address;   // malloc: first byte of the new block
    logic [ALLOC_TAG_W-1:0] index;     // malloc: allocated-list slot
  } alloc_rsp_t;

  // Access width of a load or store in bytes: char, short or int.
  typedef enum logic [1:0] {
    W_BYTE  = 2'd0,
    W_SHORT = 2'd1,
    W_INT   = 2'd2
  } width_e;

  typedef struct packed {
    logic               en;
    logic               we;
    width_e             width;
    logic [INDEX_W-1:0] addr;
    logic [DATA_W-1:0]  wdata;
  } mem_req_t;

  typedef struct packed {
    logic              valid;   // read data / write done, one cycle after en
    logic              err;     // access ran past the end of the segment
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  // Commands the main module executes, one at a time.
  typedef enum logic [1:0] {
    CMD_MALLOC = 2'd0,
    CMD_FREE   = 2'd1,
    CMD_LOAD   = 2'd2,
    CMD_STORE  = 2'd3
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e            op;
    logic [TAG_W-1:0]   seg;     // malloc: segment (tag) to allocate in
    logic [SIZE_W-1:0]  size;    // malloc: number of bytes
    width_e             width;   // load/store: access width
    ptr_t               ptr;     // free/load/store: the pointer
    logic [DATA_W-1:0]  wdata;   // store: data, right-aligned
  } cmd_t;

  typedef struct packed {
    logic              err;
    ptr_t              ptr;      // malloc: the new pointer
    logic [DATA_W-1:0] rdata;    // load: data, right-aligned, zero-extended
  } result_t;

  function automatic int unsigned width_bytes(width_e w);
    case (w)
      W_BYTE:  return 1;
      W_SHORT: return 2;
      default: return 4;
    endcase
  endfunction

endpackage
