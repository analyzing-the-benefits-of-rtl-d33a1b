// tam_pkg: types and constants shared by the Main-processor/Inlet-processor
// interface logic.
//
// The interface sits between a SPARC Main-processor that runs the threads of
// a Threaded Abstract Machine (TAM) program and a dedicated Inlet-processor
// that runs the message handlers (inlets). Both reach the Common Cache over
// one shared bus, the MICBus. This package holds:
//   * the MICBus request bundle one processor presents to the bus,
//   * the access sizes (byte for entry counters, halfword for thread
//     pointers in the LCV, word otherwise),
//   * the SPARC format-2 opcode fields used to decode the cbs instruction
//     (op = 0, op2 = 5, the one format-2 code SPARC V8 leaves unused),
//   * the width of the lcv pointer copy (the Inlet-processor increments and
//     decrements it with a 16-bit adder).
// Address and data widths are SPARC's 32 bits. The access-size encoding and
// the request bundle layout are this design's own.
package tam_pkg;

  localparam int unsigned ADDR_W = 32;   // SPARC address width
  localparam int unsigned DATA_W = 32;   // SPARC data word
  localparam int unsigned LCV_W  = 16;   // width of the lcv adder in the Inlet-processor
  localparam int unsigned TP_W   = 16;   // thread pointer: loaded with lduh, a halfword

  // Fields of a SPARC format-2 instruction word.
  localparam logic [1:0] SPARC_OP_FMT2 = 2'b00;  // inst[31:30]
  localparam logic [2:0] SPARC_OP2_CBS = 3'd5;   // inst[24:22], unused in SPARC V8

  // Size of one MICBus access.
  typedef enum logic [1:0] {
    SZ_BYTE = 2'd0,
    SZ_HALF = 2'd1,
    SZ_WORD = 2'd2
  } acc_size_e;

  // One processor's request to the MICBus. A request is held, unchanged,
  // until the bus accepts it (req & gnt & ready at a clock edge).
  typedef struct packed {
    logic              req;    // an access is wanted
    logic              we;     // 1 = store, 0 = load
    logic              lds;    // the load is an lds: load synchronization counter
    acc_size_e         size;
    logic [ADDR_W-1:0] addr;   // byte address, big-endian as on SPARC
    logic [DATA_W-1:0] wdata;  // store data, right-aligned
  } micbus_req_t;

  // Index of each processor on the MICBus.
  localparam int unsigned P_MAIN  = 0;
  localparam int unsigned P_INLET = 1;

endpackage
