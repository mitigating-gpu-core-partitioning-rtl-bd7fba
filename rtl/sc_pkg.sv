// sc_pkg: constants and types shared by the partitioned-SM model.
//
// The SM is split into four sub-cores. Each sub-core owns a 16-entry warp
// PC table, a warp issue scheduler, two collector units (CUs) and a 64 KB
// register file split into two banks. Warps of a thread block are spread over
// the sub-cores by a hashed assignment unit.
//
// Sizes taken from the architecture being modelled: four sub-cores, 64 warps
// per SM, 16-entry warp PC table, two register banks and two CUs per sub-core,
// 64 KB register file per sub-core, 32 threads per warp with 4-byte registers,
// 5-bit RBA score, three source operands per instruction.
// Own choices: 8-bit register ids, 32-bit PCs, 16-byte instructions, 32
// thread-block slots, 8-bit warp age, the decoded-instruction layout and the
// opcode that marks a warp's exit.
package sc_pkg;

  localparam int NUM_SUBCORES  = 4;
  localparam int MAX_WARPS_SM  = 64;
  localparam int TABLE_ENTRIES = 16;
  localparam int NUM_BANKS     = 2;
  localparam int NUM_CUS       = 2;
  localparam int NUM_SRC       = 3;
  localparam int WARP_SIZE     = 32;
  localparam int LANE_W        = 32;
  localparam int RF_BYTES      = 65536;
  localparam int SCORE_W       = 5;

  localparam int VREG_W   = WARP_SIZE * LANE_W;                       // 1024
  localparam int BANK_ROWS = RF_BYTES / NUM_BANKS / (VREG_W / 8);     // 256
  localparam int ROW_W    = $clog2(BANK_ROWS);                        // 8
  localparam int REGS_PER_WARP = BANK_ROWS * NUM_BANKS / TABLE_ENTRIES; // 32
  localparam int SLOT_W   = $clog2(TABLE_ENTRIES);                    // 4
  localparam int WID_W    = $clog2(MAX_WARPS_SM);                     // 6
  localparam int SC_W     = $clog2(NUM_SUBCORES);                     // 2
  localparam int BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int QLEN_W   = $clog2(NUM_CUS * NUM_SRC + 1);            // 3
  localparam int REG_W    = 8;
  localparam int PC_W     = 32;
  localparam int PC_STEP  = 16;
  localparam int TB_SLOTS = 32;
  localparam int TB_W     = $clog2(TB_SLOTS);
  localparam int NWARP_W  = $clog2(MAX_WARPS_SM + 1);                 // 7
  localparam int AGE_W    = 8;

  localparam logic [7:0] OPC_EXIT = 8'hFF;

  typedef logic [VREG_W-1:0] vreg_t;

  // Decoded instruction held in a warp PC table entry.
  typedef struct packed {
    logic [7:0]                    opcode;
    logic [REG_W-1:0]              dst;
    logic [NUM_SRC-1:0]            src_valid;
    logic [NUM_SRC-1:0][REG_W-1:0] src;
  } insn_t;

  // One entry of the fully associative warp PC table. The architecture lists
  // valid, warp id, RBA score, decoded instruction and warp PC; thread-block
  // slot, age and the instruction/fetch/exit flags are this design's additions.
  typedef struct packed {
    logic               valid;
    logic [WID_W-1:0]   warp_id;
    logic [TB_W-1:0]    tb;
    logic [SCORE_W-1:0] score;
    logic               insn_valid;
    logic               fetch_pend;
    logic               done;
    insn_t              insn;
    logic [PC_W-1:0]    pc;
    logic [AGE_W-1:0]   age;
  } wentry_t;

  // Warp PC load written into a sub-core's table at thread-block launch.
  typedef struct packed {
    logic [WID_W-1:0] warp_id;
    logic [TB_W-1:0]  tb;
    logic [PC_W-1:0]  pc;
  } warp_load_t;

  // Instruction issued from the warp scheduler into a collector unit.
  typedef struct packed {
    logic [WID_W-1:0]  warp_id;
    logic [SLOT_W-1:0] slot;
    logic [PC_W-1:0]   pc;
    insn_t             insn;
  } issue_t;

  // Instruction with its operands, sent to the execution units.
  typedef struct packed {
    issue_t                    iss;
    logic [NUM_SRC-1:0][VREG_W-1:0] opnd;
  } dispatch_t;

  // Thread-block launch message from the thread block scheduler.
  typedef struct packed {
    logic [TB_W-1:0]    tb;
    logic [NWARP_W-1:0] nwarps;
    logic [PC_W-1:0]    pc;
  } tb_launch_t;

  // Bank holding a register: registers are interleaved over the banks.
  function automatic logic [BANK_W-1:0] bank_of(input logic [REG_W-1:0] r);
    return BANK_W'(int'(r) % NUM_BANKS);
  endfunction

  // Row of a register inside its bank: each table slot owns a fixed window.
  function automatic logic [ROW_W-1:0] row_of(input logic [SLOT_W-1:0] slot,
                                             input logic [REG_W-1:0] r);
    return ROW_W'(int'(slot) * (REGS_PER_WARP / NUM_BANKS) +
                  (int'(r) % REGS_PER_WARP) / NUM_BANKS);
  endfunction

endpackage
