// warp_pc_table: the 16-entry fully associative warp PC table of one
// sub-core's warp issue scheduler.
//
// Each entry holds a resident warp: valid bit, warp id, RBA score, decoded
// next instruction and warp PC (the fields of the architecture), plus the
// thread-block slot, an age counter and flags for "instruction present",
// "fetch outstanding" and "warp exited" (this design's additions).
// Ports, all acting on the rising edge:
//  * load    - a warp PC from the sub-core multiplexer is written into the
//              lowest free entry; load_ready is low when the table is full.
//  * fetch   - the lowest entry without an instruction is offered to the
//              instruction front end (valid/ready); the request carries the entry
//              index, PC and warp id; the answer comes back on the fill
//              port, tagged with the entry index.
//  * score   - every cycle the RBA score of every entry is rewritten.
//  * issue   - the issued entry drops its instruction and steps its PC by 16;
//              an EXIT instruction marks the warp done instead.
//  * free    - when a thread block completes, all its entries are released
//              (warp resources are freed at thread-block granularity).
// Age counts cycles since the warp was loaded and saturates; larger is older.
module warp_pc_table
  import sc_pkg::*;
#(
  parameter int ENTRIES = TABLE_ENTRIES
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // warp PC load
  input  logic                            load_valid,
  input  warp_load_t                      load,
  output logic                            load_ready,
  // instruction fetch request / decoded instruction fill
  output logic                            fetch_valid,
  output logic [SLOT_W-1:0]               fetch_slot,
  output logic [PC_W-1:0]                 fetch_pc,
  output logic [WID_W-1:0]                fetch_wid,
  input  logic                            fetch_ready,
  input  logic                            fill_valid,
  input  logic [SLOT_W-1:0]               fill_slot,
  input  insn_t                           fill_insn,
  // RBA score update
  input  logic [ENTRIES-1:0][SCORE_W-1:0] score_in,
  // issue
  input  logic                            issue_valid,
  input  logic [SLOT_W-1:0]               issue_slot,
  // thread-block release
  input  logic                            free_valid,
  input  logic [TB_W-1:0]                 free_tb,
  // table contents
  output wentry_t [ENTRIES-1:0]           entries
);
  wentry_t [ENTRIES-1:0] q;
  logic [SLOT_W-1:0] free_idx;
  logic              have_free;
  logic [SLOT_W-1:0] fidx;
  logic              have_fetch;

  always_comb begin
    have_free  = 1'b0;
    free_idx   = '0;
    have_fetch = 1'b0;
    fidx       = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!q[e].valid) begin
        have_free = 1'b1;
        free_idx  = SLOT_W'(e);
      end
      if (q[e].valid && !q[e].done && !q[e].insn_valid && !q[e].fetch_pend) begin
        have_fetch = 1'b1;
        fidx       = SLOT_W'(e);
      end
    end
  end

  assign load_ready  = have_free;
  assign fetch_valid = have_fetch;
  assign fetch_slot  = fidx;
  assign fetch_pc    = q[fidx].pc;
  assign fetch_wid   = q[fidx].warp_id;
  assign entries     = q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        q[e].score <= score_in[e];
        if (q[e].valid && q[e].age != '1) q[e].age <= q[e].age + 1'b1;
      end
      if (free_valid) begin
        for (int e = 0; e < ENTRIES; e++)
          if (q[e].valid && q[e].tb == free_tb) q[e].valid <= 1'b0;
      end
      if (fetch_valid && fetch_ready) q[fidx].fetch_pend <= 1'b1;
      if (fill_valid) begin
        q[fill_slot].insn       <= fill_insn;
        q[fill_slot].insn_valid <= 1'b1;
        q[fill_slot].fetch_pend <= 1'b0;
      end
      if (issue_valid) begin
        q[issue_slot].insn_valid <= 1'b0;
        if (q[issue_slot].insn.opcode == OPC_EXIT) q[issue_slot].done <= 1'b1;
        else q[issue_slot].pc <= q[issue_slot].pc + PC_W'(PC_STEP);
      end
      if (load_valid && have_free) begin
        q[free_idx]         <= '0;
        q[free_idx].valid   <= 1'b1;
        q[free_idx].warp_id <= load.warp_id;
        q[free_idx].tb      <= load.tb;
        q[free_idx].pc      <= load.pc;
      end
    end
  end

  // A fill must answer an outstanding fetch of a resident warp.
  a_fill_pending: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> (q[fill_slot].valid && q[fill_slot].fetch_pend));
endmodule
