// subcore: one sub-core (processing block) of a partitioned SM.
//
// A sub-core owns its warp issue scheduler with the 16-entry warp PC table,
// and an operand collector with two collector units and a 64 KB register
// file in two banks. Warps never move between sub-cores: once a warp PC is
// loaded here (`load_*`), all of its instructions issue from this scheduler
// and read this register file. The scheduler is register-bank aware: the
// operand collector's per-bank request-queue lengths steer which warp issues.
// Instructions enter through the decoded-instruction fill port (the
// instruction caches and decoder are outside this model), leave with their
// operands on the `ex_*` port to the execution units (also outside), and
// results come back on `wb_*`. An exiting warp is reported on
// `warp_done_*`; its table entry is released only when `free_*` announces the
// end of its whole thread block.
// Parameters: NCU collector units (2), SCORE_LAT extra score-update cycles (0).
module subcore
  import sc_pkg::*;
#(
  parameter int NCU       = NUM_CUS,
  parameter int SCORE_LAT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_valid,
  input  warp_load_t        load,
  output logic              load_ready,
  output logic              fetch_valid,
  output logic [SLOT_W-1:0] fetch_slot,
  output logic [PC_W-1:0]   fetch_pc,
  output logic [WID_W-1:0]  fetch_wid,
  input  logic              fetch_ready,
  input  logic              fill_valid,
  input  logic [SLOT_W-1:0] fill_slot,
  input  insn_t             fill_insn,
  output logic              ex_valid,
  output dispatch_t         ex,
  input  logic              ex_ready,
  input  logic              wb_valid,
  input  logic [SLOT_W-1:0] wb_slot,
  input  logic [REG_W-1:0]  wb_reg,
  input  vreg_t             wb_data,
  output logic              warp_done_valid,
  output logic [TB_W-1:0]   warp_done_tb,
  input  logic              free_valid,
  input  logic [TB_W-1:0]   free_tb
);
  logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen;
  logic   cu_free;
  logic [TABLE_ENTRIES-1:0] slot_busy;
  logic   iss_valid;
  issue_t iss;

  warp_issue_scheduler #(.ENTRIES(TABLE_ENTRIES), .SCORE_LAT(SCORE_LAT)) u_sched (
    .clk, .rst_n,
    .load_valid, .load, .load_ready,
    .fetch_valid, .fetch_slot, .fetch_pc, .fetch_wid, .fetch_ready,
    .fill_valid, .fill_slot, .fill_insn,
    .qlen, .cu_free, .slot_busy, .iss_valid, .iss,
    .warp_done_valid, .warp_done_tb, .free_valid, .free_tb
  );

  operand_collector #(.NCU(NCU)) u_oc (
    .clk, .rst_n,
    .alloc_valid(iss_valid), .alloc(iss), .cu_free, .slot_busy,
    .qlen,
    .ex_valid, .ex, .ex_ready,
    .wb_valid, .wb_slot, .wb_reg, .wb_data
  );
endmodule
