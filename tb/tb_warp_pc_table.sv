// Testbench for warp_pc_table: fills all 16 entries (load_ready must drop
// only when full), serves fetch requests lowest entry first, fills decoded
// instructions, issues (PC steps by 16), retires a warp with EXIT, checks
// score write-through and ages, and releases entries by thread block.
`include "tb_check.svh"
module tb_warp_pc_table;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load_valid = 0, load_ready;
  warp_load_t load = '0;
  logic fetch_valid, fetch_ready = 0;
  logic [SLOT_W-1:0] fetch_slot, fill_slot = '0, issue_slot = '0;
  logic [PC_W-1:0] fetch_pc;
  logic [WID_W-1:0] fetch_wid;
  logic fill_valid = 0, issue_valid = 0, free_valid = 0;
  insn_t fill_insn = '0;
  logic [TABLE_ENTRIES-1:0][SCORE_W-1:0] score_in = '0;
  logic [TB_W-1:0] free_tb = '0;
  wentry_t [TABLE_ENTRIES-1:0] entries;
  always #5 clk = ~clk;
  warp_pc_table dut (.clk, .rst_n, .load_valid, .load, .load_ready,
    .fetch_valid, .fetch_slot, .fetch_pc, .fetch_wid, .fetch_ready,
    .fill_valid, .fill_slot, .fill_insn, .score_in,
    .issue_valid, .issue_slot, .free_valid, .free_tb, .entries);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk); #1;
    `CHECK(load_ready && !fetch_valid, "empty after reset")
    // 16 warps of two thread blocks (tb 3: even slots' warps 0..7, tb 9: 8..15)
    for (int w = 0; w < 16; w++) begin
      load_valid <= 1;
      load <= '{warp_id: WID_W'(w + 20), tb: TB_W'((w < 8) ? 3 : 9), pc: 32'h1000 + 32'(w) * 32'h100};
      #1; `CHECK(load_ready, $sformatf("room for warp %0d", w))
      @(posedge clk);
    end
    load_valid <= 0; #1;
    `CHECK(!load_ready, "full after 16 loads")
    for (int e = 0; e < 16; e++)
      `CHECK(entries[e].valid && int'(entries[e].warp_id) == e + 20 && entries[e].pc == 32'h1000 + 32'(e) * 32'h100,
             $sformatf("entry %0d contents", e))
    `CHECK(entries[0].age > entries[15].age, "older entry has larger age")
    // fetch requests come lowest-first and once each
    for (int e = 0; e < 16; e++) begin
      fetch_ready <= 1; #1;
      `CHECK(fetch_valid && int'(fetch_slot) == e && fetch_pc == 32'h1000 + 32'(e) * 32'h100 &&
             int'(fetch_wid) == e + 20, $sformatf("fetch %0d", e))
      @(posedge clk);
    end
    fetch_ready <= 0; #1;
    `CHECK(!fetch_valid, "no fetch while all pending")
    // fill: slot 5 gets EXIT, others an ALU op
    for (int e = 0; e < 16; e++) begin
      fill_valid <= 1; fill_slot <= SLOT_W'(e);
      fill_insn <= '{opcode: (e == 5) ? OPC_EXIT : 8'h01, dst: 8'd1, src_valid: 3'b011, src: {8'd0, 8'd3, 8'd2}};
      @(posedge clk);
    end
    fill_valid <= 0;
    for (int e = 0; e < 16; e++) score_in[e] <= 5'(e + 1);
    @(posedge clk); #1;
    for (int e = 0; e < 16; e++) `CHECK(entries[e].insn_valid && entries[e].score == 5'(e + 1), "filled and scored")
    // issue slot 2 (ALU) and slot 5 (EXIT)
    issue_valid <= 1; issue_slot <= 4'd2; @(posedge clk);
    issue_slot <= 4'd5; @(posedge clk);
    issue_valid <= 0; #1;
    `CHECK(!entries[2].insn_valid && entries[2].pc == 32'h1210, "issue steps PC by 16")
    `CHECK(entries[5].done && entries[5].pc == 32'h1500, "EXIT marks done, PC kept")
    `CHECK(fetch_valid && fetch_slot == 4'd2 && fetch_pc == 32'h1210, "refetch after issue")
    // free thread block 3: entries 0..7 released
    free_valid <= 1; free_tb <= TB_W'(3); @(posedge clk);
    free_valid <= 0; #1;
    for (int e = 0; e < 16; e++) `CHECK(entries[e].valid == (e >= 8), $sformatf("free entry %0d", e))
    `CHECK(load_ready, "room after free")
    // next load goes to lowest free entry with age 0
    load_valid <= 1; load <= '{warp_id: 6'd63, tb: 5'd1, pc: 32'h4000}; @(posedge clk);
    load_valid <= 0; #1;
    `CHECK(entries[0].valid && entries[0].warp_id == 6'd63 && entries[0].age == 0 && !entries[0].done, "reload slot 0")
    `TB_FINISH
  end
endmodule
