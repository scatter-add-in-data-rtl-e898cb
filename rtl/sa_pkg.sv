// sa_pkg: types and constants shared by the scatter-add memory-side blocks.
//
// A request from an address generator is either a plain memory write, which
// passes straight through to the cache bank, or a scatter-add, which adds its
// value to the word already in memory. Values are 64-bit words; a scatter-add
// treats them as two's-complement integers or as IEEE-754 doubles. Addresses
// are word addresses. The 64-bit word and the two data types follow the
// description of the mechanism; the address width, the request encoding and
// the field order are this design's own choices.
package sa_pkg;

  localparam int unsigned DATA_W = 64;

  // Kind of request arriving from an address generator.
  typedef enum logic [0:0] {
    OP_WRITE = 1'b0,  // ordinary store, bypasses the combining logic
    OP_SADD  = 1'b1   // scatter-add: mem[addr] += data, atomically
  } sa_op_e;

  // How a scatter-add interprets its 64-bit operand.
  typedef enum logic [0:0] {
    DT_INT = 1'b0,    // 64-bit two's-complement integer, wrapping
    DT_FP  = 1'b1     // IEEE-754 binary64, round to nearest even
  } sa_dtype_e;

  // Word address width. The cache bank of a request is chosen by the low
  // address bits, so every bank sees full addresses.
  localparam int unsigned ADDR_W = 32;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Request from an address generator (without its source number, which the
  // bank crossbar adds).
  typedef struct packed {
    sa_op_e    op;
    sa_dtype_e dtype;
    addr_t     addr;
    data_t     data;
  } ag_req_t;

  // Request as seen by one scatter-add unit: the source tells where the
  // acknowledgement of a scatter-add goes.
  typedef struct packed {
    sa_op_e    op;
    sa_dtype_e dtype;
    logic [3:0] src;     // address generator number (up to 16)
    addr_t     addr;
    data_t     data;
  } sa_req_t;

  // Request from a scatter-add unit to its cache bank / memory channel.
  typedef struct packed {
    logic  we;           // 1: write data, 0: read the word for a scatter-add
    addr_t addr;
    data_t data;
  } mem_req_t;

  // Word returned for an earlier read.
  typedef struct packed {
    addr_t addr;
    data_t data;
  } mem_resp_t;

  // One-cycle event flags of a scatter-add unit, for performance counting.
  typedef struct packed {
    logic bypass;        // a plain write passed through
    logic full_stall;    // a scatter-add waited: no free combining-store entry
    logic combine;       // a scatter-add matched a pending address: no fetch
    logic fetch;         // a scatter-add missed: the current value was fetched
    logic recirc;        // a finished sum was added to another pending entry
    logic writeback;     // a finished sum was written to memory
    logic ret_stall;     // a returned value waited for the functional unit
    logic hazard_stall;  // a scatter-add waited on a sum finishing for its address
  } sa_events_t;

endpackage
