// tm_pkg: types and constants shared by the temporal-memory result
// propagation design.
//
// The temporal memory forwards results (branch targets, load/store values)
// from the leading thread of a redundantly multithreaded processor to the
// trailing thread. Two memories are built: one for branches, whose entry is
// {PC, DEST, INST, FREE@acc} = 32+32+32+4 = 100 bits, and one for data,
// whose entry is {ADDR, VAL, FREE@acc} = 32+32+4 = 68 bits. These field
// widths, the 16-entry size and the four leading write ports follow the
// published design; the struct bundling of the port signals is this
// design's own choice.
package tm_pkg;

  localparam int unsigned XLEN        = 32;  // PC / address / data / instruction width
  localparam int unsigned TM_ENTRIES  = 16;  // entries per temporal memory
  localparam int unsigned TM_WPORTS   = 4;   // parallel leading-thread write ports
  localparam int unsigned TM_STAMP_W     = 4;   // width of the FREE@acc field

  // Operating mode of a temporal memory.
  typedef enum logic {
    MODE_STARTUP = 1'b0,  // entries preloaded from the start-up store, bus check
    MODE_LOOKUP  = 1'b1   // normal result forwarding
  } tm_mode_e;

  // Branch entry as listed for the branch temporal memory (100 bits).
  typedef struct packed {
    logic [XLEN-1:0]    pc;        // program counter at the branch
    logic [XLEN-1:0]    dest;      // branch target + 4
    logic [XLEN-1:0]    inst;      // instruction at the branch target
    logic [TM_STAMP_W-1:0] free_acc;  // FREE@acc time stamp
  } br_entry_t;

  // Data entry as listed for the data temporal memory (68 bits).
  typedef struct packed {
    logic [XLEN-1:0]    addr;      // memory address
    logic [XLEN-1:0]    val;       // data value
    logic [TM_STAMP_W-1:0] free_acc;  // FREE@acc time stamp
  } data_entry_t;

  // One leading-thread branch result as it leaves decode/commit.
  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] pc;      // PC of the branch
    logic [XLEN-1:0] target;  // branch target (DEST stores target + 4)
    logic [XLEN-1:0] inst;    // instruction fetched at the target
  } br_write_t;

  // One leading-thread load/store result.
  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] val;
  } data_write_t;

endpackage
