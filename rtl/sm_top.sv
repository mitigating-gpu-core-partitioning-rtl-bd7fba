// sm_top: a streaming multiprocessor partitioned into four sub-cores, with
// the two scheduling mechanisms that recover the performance lost to the
// partitioning.
//
// 1. Hashed sub-core warp assignment. Thread blocks arrive from the thread
//    block scheduler (`launch_*`). The interconnect arbiter writes their warp
//    PCs one per cycle into the sub-core warp PC tables through the sub-core
//    multiplexer, whose select lines come from the hashed assignment unit: a
//    4-entry, 1-byte hash function table read every fourth warp into two
//    4-bit shift registers. Software programs the table (`hash_wr_*`); its
//    reset content is skewed round robin, and writing 8'hAC in every entry
//    gives plain round robin (warp W to sub-core W mod 4).
// 2. Register-bank-aware (RBA) warp scheduling inside each sub-core: the warp
//    whose source registers sit in the least contended register banks issues
//    first, the oldest breaking ties.
// Per sub-core s the arrays below carry: the instruction front end
// (`fetch_*` requests for the next instruction of a table slot, `fill_*`
// returns it decoded), dispatched instructions with operands to the
// execution units (`ex_*`), and register write-back (`wb_*`). Completed
// thread blocks are reported on `tb_done_*`; `load_stall` is high while a
// warp load waits for room in its sub-core's table. The execution units,
// instruction caches/decoder, shared memory and the thread block scheduler
// are outside this model.
// Parameters: NCU collector units per sub-core (2), SCORE_LAT extra cycles of
// score-update latency (0).
module sm_top
  import sc_pkg::*;
#(
  parameter int NCU       = NUM_CUS,
  parameter int SCORE_LAT = 0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // thread block scheduler
  input  logic                                   launch_valid,
  input  tb_launch_t                             launch,
  output logic                                   launch_ready,
  output logic                                   tb_done_valid,
  output logic [TB_W-1:0]                        tb_done_tb,
  output logic                                   load_stall,
  // hash function table programming
  input  logic                                   hash_wr_en,
  input  logic [1:0]                             hash_wr_idx,
  input  logic [7:0]                             hash_wr_data,
  // instruction front end, per sub-core
  output logic [NUM_SUBCORES-1:0]                fetch_valid,
  output logic [NUM_SUBCORES-1:0][SLOT_W-1:0]    fetch_slot,
  output logic [NUM_SUBCORES-1:0][PC_W-1:0]      fetch_pc,
  output logic [NUM_SUBCORES-1:0][WID_W-1:0]     fetch_wid,
  input  logic [NUM_SUBCORES-1:0]                fetch_ready,
  input  logic [NUM_SUBCORES-1:0]                fill_valid,
  input  logic [NUM_SUBCORES-1:0][SLOT_W-1:0]    fill_slot,
  input  insn_t [NUM_SUBCORES-1:0]               fill_insn,
  // execution units, per sub-core
  output logic [NUM_SUBCORES-1:0]                ex_valid,
  output dispatch_t [NUM_SUBCORES-1:0]           ex,
  input  logic [NUM_SUBCORES-1:0]                ex_ready,
  input  logic [NUM_SUBCORES-1:0]                wb_valid,
  input  logic [NUM_SUBCORES-1:0][SLOT_W-1:0]    wb_slot,
  input  logic [NUM_SUBCORES-1:0][REG_W-1:0]     wb_reg,
  input  vreg_t [NUM_SUBCORES-1:0]               wb_data
);
  logic                                  advance;
  logic [SC_W-1:0]                       sel;
  logic [NUM_SUBCORES-1:0]               load_valid, load_ready;
  warp_load_t                            load;
  logic [NUM_SUBCORES-1:0]               wdone_valid;
  logic [NUM_SUBCORES-1:0][TB_W-1:0]     wdone_tb;

  sm_interconnect_arbiter u_arb (
    .clk, .rst_n,
    .launch_valid, .launch, .launch_ready,
    .tb_done_valid, .tb_done_tb,
    .assign_advance(advance), .assign_subcore(sel),
    .load_valid, .load, .load_ready, .load_stall,
    .warp_done_valid(wdone_valid), .warp_done_tb(wdone_tb)
  );

  subcore_assigner u_assign (
    .clk, .rst_n,
    .tbl_wr_en(hash_wr_en), .tbl_wr_idx(hash_wr_idx), .tbl_wr_data(hash_wr_data),
    .advance, .subcore(sel)
  );

  for (genvar s = 0; s < NUM_SUBCORES; s++) begin : g_sc
    subcore #(.NCU(NCU), .SCORE_LAT(SCORE_LAT)) u_sc (
      .clk, .rst_n,
      .load_valid(load_valid[s]), .load, .load_ready(load_ready[s]),
      .fetch_valid(fetch_valid[s]), .fetch_slot(fetch_slot[s]),
      .fetch_pc(fetch_pc[s]), .fetch_wid(fetch_wid[s]), .fetch_ready(fetch_ready[s]),
      .fill_valid(fill_valid[s]), .fill_slot(fill_slot[s]), .fill_insn(fill_insn[s]),
      .ex_valid(ex_valid[s]), .ex(ex[s]), .ex_ready(ex_ready[s]),
      .wb_valid(wb_valid[s]), .wb_slot(wb_slot[s]), .wb_reg(wb_reg[s]),
      .wb_data(wb_data[s]),
      .warp_done_valid(wdone_valid[s]), .warp_done_tb(wdone_tb[s]),
      .free_valid(tb_done_valid), .free_tb(tb_done_tb)
    );
  end
endmodule
