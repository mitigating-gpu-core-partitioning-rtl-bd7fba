// warp_issue_scheduler: the register-bank-aware (RBA) warp issue scheduler of
// one sub-core.
//
// It combines the 16-entry warp PC table, the RBA scoring logic and the warp
// selection logic. Every cycle the scoring logic turns the operand
// collector's per-bank request-queue lengths into a score per entry (sum of
// the queue lengths of the banks its source operands live in) and writes it
// into the table. The selection logic then compares the candidates on
// {score, ~age}: the warp whose operands sit in the least contended banks
// wins, the oldest warp breaking ties. One instruction issues per cycle:
//  * a normal instruction issues only while a collector unit is free
//    (`cu_free`); it leaves on `iss_valid`/`iss` and the OC allocates a CU in
//    the same cycle;
//  * an EXIT instruction needs no CU; it waits until the warp has no
//    instruction left in a collector unit (`slot_busy`), then marks the warp
//    done and reports `warp_done_valid`/`warp_done_tb` so the thread block
//    can be retired without its registers being freed under a pending read.
// The queue lengths pass through SCORE_LAT extra pipeline registers before
// scoring (0 to 20 cycles were studied; 0 is the default here), and the table
// adds one register, so a score is one cycle behind the queues at the default.
// The comparison key, the one-issue-per-cycle rate and the table size follow
// the architecture; the EXIT handling and the latency register are this
// design's.
module warp_issue_scheduler
  import sc_pkg::*;
#(
  parameter int ENTRIES   = TABLE_ENTRIES,
  parameter int SCORE_LAT = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // warp PC load from the sub-core multiplexer
  input  logic                            load_valid,
  input  warp_load_t                      load,
  output logic                            load_ready,
  // instruction front end
  output logic                            fetch_valid,
  output logic [SLOT_W-1:0]               fetch_slot,
  output logic [PC_W-1:0]                 fetch_pc,
  output logic [WID_W-1:0]                fetch_wid,
  input  logic                            fetch_ready,
  input  logic                            fill_valid,
  input  logic [SLOT_W-1:0]               fill_slot,
  input  insn_t                           fill_insn,
  // operand collector
  input  logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen,
  input  logic                            cu_free,
  input  logic [ENTRIES-1:0]              slot_busy,
  output logic                            iss_valid,
  output issue_t                          iss,
  // warp exit and thread-block release
  output logic                            warp_done_valid,
  output logic [TB_W-1:0]                 warp_done_tb,
  input  logic                            free_valid,
  input  logic [TB_W-1:0]                 free_tb
);
  localparam int KEY_W = SCORE_W + AGE_W;

  wentry_t [ENTRIES-1:0]            ent;
  logic [ENTRIES-1:0][SCORE_W-1:0]  score;
  insn_t [ENTRIES-1:0]              insns;
  logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen_d;
  logic [ENTRIES-1:0]               cand;
  logic [ENTRIES-1:0][KEY_W-1:0]    key;
  logic                             found;
  logic [SLOT_W-1:0]                sel;
  logic                             sel_exit;

  // optional score-update latency
  if (SCORE_LAT == 0) begin : g_nolat
    assign qlen_d = qlen;
  end else begin : g_lat
    logic [SCORE_LAT-1:0][NUM_BANKS-1:0][QLEN_W-1:0] pipe;
    always_ff @(posedge clk) begin
      if (!rst_n) pipe <= '0;
      else begin
        pipe[0] <= qlen;
        for (int i = 1; i < SCORE_LAT; i++) pipe[i] <= pipe[i-1];
      end
    end
    assign qlen_d = pipe[SCORE_LAT-1];
  end

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      insns[e] = ent[e].insn;
      cand[e]  = ent[e].valid && !ent[e].done && ent[e].insn_valid &&
                 (ent[e].insn.opcode == OPC_EXIT ? !slot_busy[e] : cu_free);
      key[e]   = {ent[e].score, ~ent[e].age};
    end
  end

  rba_scoring_logic #(.ENTRIES(ENTRIES)) u_score (
    .qlen(qlen_d), .insn(insns), .score(score)
  );

  warp_selection_logic #(.N(ENTRIES), .KEY_W(KEY_W), .IDX_W(SLOT_W)) u_select (
    .valid(cand), .key(key), .found(found), .idx(sel)
  );

  warp_pc_table #(.ENTRIES(ENTRIES)) u_table (
    .clk, .rst_n,
    .load_valid, .load, .load_ready,
    .fetch_valid, .fetch_slot, .fetch_pc, .fetch_wid, .fetch_ready,
    .fill_valid, .fill_slot, .fill_insn,
    .score_in(score),
    .issue_valid(found), .issue_slot(sel),
    .free_valid, .free_tb,
    .entries(ent)
  );

  assign sel_exit        = ent[sel].insn.opcode == OPC_EXIT;
  assign iss_valid       = found && !sel_exit;
  assign iss.warp_id     = ent[sel].warp_id;
  assign iss.slot        = sel;
  assign iss.pc          = ent[sel].pc;
  assign iss.insn        = ent[sel].insn;
  assign warp_done_valid = found && sel_exit;
  assign warp_done_tb    = ent[sel].tb;

  a_issue_needs_cu: assert property (@(posedge clk) disable iff (!rst_n)
    iss_valid |-> cu_free);
endmodule
