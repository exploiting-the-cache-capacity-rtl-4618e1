// emig_pkg: shared constants and types for the execution-migration support logic.
//
// Sizes that follow the published design: 64-byte cache lines and 64-bit addresses (so a line
// address has 58 bits), 16-bit affinity values, 18-bit transition filters, R-windows of 128 (X)
// and 64 (Y) references, an 8k-entry 4-way skewed-associative affinity cache with 20-bit tags
// and 2-bit ages, four cores, and an update bus that carries up to four retired instructions per
// cycle with 6-bit register numbers, 64-bit values, one store address and the 16 low-order bits
// of one branch address. The encodings of the slot kinds and the field order of the structs are
// this design's own choices.
package emig_pkg;

  localparam int unsigned LINE_W    = 58;  // line address bits (64-bit address, 64-byte lines)
  localparam int unsigned ADDR_W    = 64;  // byte address bits
  localparam int unsigned AFF_W     = 16;  // affinity value / stored offset bits
  localparam int unsigned FILT_W    = 18;  // transition filter bits
  localparam int unsigned NCORES    = 4;
  localparam int unsigned CORE_W    = 2;
  localparam int unsigned RETIRE_W  = 4;   // retired instructions broadcast per cycle
  localparam int unsigned REG_ID_W  = 6;
  localparam int unsigned XLEN      = 64;
  localparam int unsigned BR_ADDR_W = 16;  // low-order branch-address bits sent on the bus

  // What one retirement slot of the update bus carries.
  typedef enum logic [2:0] {
    UB_NONE   = 3'd0,  // empty slot
    UB_REG    = 3'd1,  // register write: reg_id <- value
    UB_STORE  = 3'd2,  // store: mem[store_addr] <- value
    UB_BRANCH = 3'd3,  // branch: trains predictors; value = target, taken flag in packet
    UB_TLB    = 3'd4   // TLB-modifying instruction: value = its operand
  } ub_kind_e;

  typedef struct packed {
    ub_kind_e                 kind;
    logic                     transition;  // this is the transition instruction T
    logic [REG_ID_W-1:0]      reg_id;
    logic [XLEN-1:0]          value;
  } ub_slot_t;

  typedef struct packed {
    ub_slot_t [RETIRE_W-1:0]  slot;
    logic [ADDR_W-1:0]        store_addr;  // one store per cycle
    logic [BR_ADDR_W-1:0]     br_addr;     // one branch per cycle
    logic                     br_taken;
  } ub_packet_t;

  // Migration-controller mechanisms of the 4-way split.
  typedef enum logic [1:0] {
    MECH_X   = 2'd0,
    MECH_YP  = 2'd1,  // Y[+1]
    MECH_YN  = 2'd2   // Y[-1]
  } mech_e;

endpackage
