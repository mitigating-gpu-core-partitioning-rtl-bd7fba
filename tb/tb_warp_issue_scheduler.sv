// Testbench for warp_issue_scheduler. A small front-end model answers every
// fetch one cycle later from a fixed program: the first instruction of a
// warp depends on its table slot, every later one is EXIT.
//  Phase 1: with no CU free only EXIT may issue, and only once the warp
//           has no instruction left in a collector unit.
//  Phase 2: bank 1 is congested (queue 4, bank 0 empty). Expected RBA
//           scores: slot 0 (bank-1 operands) 12, slot 1 (bank-0) 0,
//           slot 2 (one of each) 4. Slot 1 must issue first, then slot 2
//           ahead of the older slot 0.
//  Phase 3: equal scores fall back to oldest first.
//  Latency: a second instance with SCORE_LAT=4 must see a queue change in
//           its stored scores 4 cycles after the first instance.
`include "tb_check.svh"
module tb_warp_issue_scheduler;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load_valid = 0, load_ready, load_ready2;
  warp_load_t load = '0;
  logic fetch_valid, fetch_ready = 1, fetch_valid2;
  logic [SLOT_W-1:0] fetch_slot, fill_slot = '0, fetch_slot2;
  logic [PC_W-1:0] fetch_pc, fetch_pc2;
  logic [WID_W-1:0] fetch_wid, fetch_wid2;
  logic fill_valid = 0;
  insn_t fill_insn = '0;
  logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen = '0;
  logic cu_free = 0, iss_valid, iss_valid2;
  logic [TABLE_ENTRIES-1:0] slot_busy = '0;
  issue_t iss, iss2;
  logic warp_done_valid, warp_done_valid2;
  logic [TB_W-1:0] warp_done_tb, warp_done_tb2;
  logic free_valid = 0;
  logic [TB_W-1:0] free_tb = '0;
  logic [PC_W-1:0] start_pc [TABLE_ENTRIES];
  int dones = 0;

  always #5 clk = ~clk;

  warp_issue_scheduler dut (.clk, .rst_n, .load_valid, .load, .load_ready,
    .fetch_valid, .fetch_slot, .fetch_pc, .fetch_wid, .fetch_ready,
    .fill_valid, .fill_slot, .fill_insn, .qlen, .cu_free, .slot_busy, .iss_valid, .iss,
    .warp_done_valid, .warp_done_tb, .free_valid, .free_tb);

  // same inputs, 4 extra cycles of score latency, never issues
  warp_issue_scheduler #(.SCORE_LAT(4)) dut_lat (.clk, .rst_n, .load_valid, .load,
    .load_ready(load_ready2), .fetch_valid(fetch_valid2), .fetch_slot(fetch_slot2),
    .fetch_pc(fetch_pc2), .fetch_wid(fetch_wid2), .fetch_ready(1'b0), .fill_valid(1'b0), .fill_slot('0),
    .fill_insn('0), .qlen, .cu_free(1'b0), .slot_busy('0), .iss_valid(iss_valid2), .iss(iss2),
    .warp_done_valid(warp_done_valid2), .warp_done_tb(warp_done_tb2),
    .free_valid, .free_tb);

  function automatic insn_t prog(input int slot, input int k, input int phase);
    insn_t i;
    i = '0;
    i.opcode = 8'h01;
    i.dst = 8'd9;
    if (k > 0 || (phase == 1 && slot == 3)) i.opcode = OPC_EXIT;
    else if (phase == 2) begin
      i.src_valid = 3'b111; i.src = {8'd5, 8'd7, 8'd9};            // all bank 1
    end else case (slot)
      0: begin i.src_valid = 3'b111; i.src = {8'd1, 8'd3, 8'd5}; end  // bank 1
      1: begin i.src_valid = 3'b111; i.src = {8'd2, 8'd4, 8'd6}; end  // bank 0
      2: begin i.src_valid = 3'b011; i.src = {8'd0, 8'd1, 8'd2}; end  // one each
      default: ;
    endcase
    return i;
  endfunction

  int phase = 1;
  // front-end model
  always @(posedge clk) begin
    if (fetch_valid && fetch_ready && rst_n) begin
      fill_valid <= 1;
      fill_slot  <= fetch_slot;
      fill_insn  <= prog(int'(fetch_slot), int'((fetch_pc - start_pc[fetch_slot]) / 16), phase);
    end else fill_valid <= 0;
    if (warp_done_valid) dones++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic load_warps(input int n, input int tb);
    for (int w = 0; w < n; w++) begin
      load_valid <= 1;
      load <= '{warp_id: WID_W'(w + tb * 4), tb: TB_W'(tb), pc: 32'h100 * 32'(w + 1)};
      start_pc[w] = 32'h100 * 32'(w + 1);
      @(posedge clk);
    end
    load_valid <= 0;
  endtask

  task automatic pulse_cu(output issue_t got, output logic v);
    cu_free <= 1; #1;
    v = iss_valid; got = iss;
    @(posedge clk);
    cu_free <= 0;
  endtask

  initial begin
    issue_t g; logic v;
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    // phase 1
    slot_busy <= 16'h0008;
    load_warps(4, 0);
    repeat (6) @(posedge clk);
    `CHECK(dones == 0, "EXIT waits while the warp has an instruction in a CU")
    slot_busy <= '0;
    repeat (8) begin
      @(posedge clk); #1;
      `CHECK(!iss_valid, "no issue without a free CU")
    end
    `CHECK(dones == 1, $sformatf("only the EXIT warp retired (%0d)", dones))
    // phase 2
    qlen[1] <= 3'd4; qlen[0] <= 3'd0;
    repeat (3) @(posedge clk);
    `CHECK(dut.ent[0].score == 5'd12 && dut.ent[1].score == 5'd0 && dut.ent[2].score == 5'd4,
           $sformatf("scores %0d %0d %0d", dut.ent[0].score, dut.ent[1].score, dut.ent[2].score))
    pulse_cu(g, v);
    `CHECK(v && g.slot == 4'd1 && g.pc == 32'h200 && g.insn.src == {8'd2, 8'd4, 8'd6}, "lowest score issues first")
    repeat (4) @(posedge clk);
    pulse_cu(g, v);
    `CHECK(v && g.slot == 4'd2, $sformatf("RBA passes the older warp (slot %0d)", g.slot))
    repeat (4) @(posedge clk);
    pulse_cu(g, v);
    `CHECK(v && g.slot == 4'd0 && g.warp_id == 6'd0, "last warp")
    repeat (6) @(posedge clk);
    `CHECK(dones == 4, $sformatf("all four exited (%0d)", dones))
    // latency: change queues and watch both score copies
    qlen[0] <= 3'd1; qlen[1] <= 3'd0;
    @(posedge clk); @(posedge clk); #1;
    `CHECK(dut.ent[0].score == 5'd0, "fast copy updated after one cycle")
    `CHECK(dut_lat.ent[0].score == 5'd0 && dut_lat.ent[1].score == 5'd0, "latency copy holds old score (no insn)")
    free_valid <= 1; free_tb <= '0; @(posedge clk); free_valid <= 0;
    // phase 3: same instruction everywhere, equal scores
    phase = 2;
    load_warps(3, 1);
    repeat (5) @(posedge clk);
    for (int w = 0; w < 3; w++) begin
      pulse_cu(g, v);
      `CHECK(v && int'(g.slot) == w, $sformatf("oldest first: got slot %0d exp %0d", g.slot, w))
      repeat (5) @(posedge clk);
    end
    `TB_FINISH
  end

  // the latency copy scores queue lengths that are exactly 4 cycles old
  int cyc = 0;
  logic [NUM_BANKS-1:0][QLEN_W-1:0] hist [8];
  always @(posedge clk) begin
    for (int i = 7; i > 0; i--) hist[i] <= hist[i-1];
    hist[0] <= qlen;
    cyc++;
    if (cyc > 10) begin
      checks++;
      if (dut_lat.qlen_d != hist[3]) begin
        failures++; $display("FAIL %0t: SCORE_LAT=4 queue delay", $time);
      end
    end
  end
endmodule
