// Testbench for operand_collector at its default size (two CUs, two banks
// of 256 x 1024 bits). The register file is first written through the
// write-back port with a pattern that encodes slot, register and lane. Then:
//  * latency: an instruction with one operand per bank dispatches 3 cycles
//    after its issue cycle, one with two operands in the same bank after 4;
//  * queue lengths: right after issuing {r2, r4, r1} the bank queues read
//    2 and 1;
//  * stress: random instructions issued whenever a CU is free, random
//    execution-unit backpressure; every dispatched operand must equal the
//    pattern, every instruction must come out exactly once, and bank
//    conflicts must have occurred.
`include "tb_check.svh"
module tb_operand_collector;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, cu_free;
  logic [TABLE_ENTRIES-1:0] slot_busy;
  issue_t alloc = '0;
  logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen;
  logic ex_valid, ex_ready = 0;
  dispatch_t ex;
  logic wb_valid = 0;
  logic [SLOT_W-1:0] wb_slot = '0;
  logic [REG_W-1:0] wb_reg = '0;
  vreg_t wb_data = '0;
  int outstanding [int];
  int conflicts = 0, dispatched = 0;
  always #5 clk = ~clk;
  operand_collector dut (.clk, .rst_n, .alloc_valid, .alloc, .cu_free, .slot_busy, .qlen,
    .ex_valid, .ex, .ex_ready, .wb_valid, .wb_slot, .wb_reg, .wb_data);

  function automatic vreg_t pat(input int slot, input int r);
    vreg_t v;
    for (int l = 0; l < 32; l++) v[l*32 +: 32] = 32'(slot * 16777216 + r * 65536 + l * 7 + 1);
    return v;
  endfunction

  function automatic issue_t mk(input int slot, input int pc, input logic [2:0] sv,
                                input int r0, input int r1, input int r2);
    issue_t a;
    a = '0;
    a.slot = SLOT_W'(slot); a.pc = 32'(pc); a.warp_id = WID_W'(slot);
    a.insn.opcode = 8'h01; a.insn.src_valid = sv;
    a.insn.src = {REG_W'(r2), REG_W'(r1), REG_W'(r0)};
    return a;
  endfunction

  task automatic check_dispatch();
    int key;
    key = int'(ex.iss.pc);
    `CHECK(outstanding.exists(key), $sformatf("unexpected dispatch pc %0h", key))
    for (int s = 0; s < NUM_SRC; s++)
      `CHECK(ex.opnd[s] == (ex.iss.insn.src_valid[s] ? pat(int'(ex.iss.slot), int'(ex.iss.insn.src[s]) % 32) : '0),
             $sformatf("pc %0h operand %0d", key, s))
    outstanding.delete(key);
    dispatched++;
  endtask

  // one-instruction latency measurement, EU always ready
  task automatic measure(input issue_t a, input int expect_cycles);
    int n;
    ex_ready <= 1;
    alloc_valid <= 1; alloc <= a; outstanding[int'(a.pc)] = 1;
    @(posedge clk);
    alloc_valid <= 0;
    n = 1;
    #1;
    while (!ex_valid && n < 20) begin
      @(posedge clk); #1; n++;
    end
    `CHECK(n == expect_cycles, $sformatf("latency %0d exp %0d", n, expect_cycles))
    check_dispatch();
    @(posedge clk);
    ex_ready <= 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int s = 0; s < TABLE_ENTRIES; s++)
      for (int r = 0; r < REGS_PER_WARP; r++) begin
        wb_valid <= 1; wb_slot <= SLOT_W'(s); wb_reg <= REG_W'(r); wb_data <= pat(s, r);
        @(posedge clk);
      end
    wb_valid <= 0;
    @(posedge clk); #1;
    `CHECK(cu_free && qlen == '0, "idle collector")
    measure(mk(3, 'h10, 3'b011, 4, 7, 0), 3);
    measure(mk(5, 'h20, 3'b111, 2, 6, 9), 4);
    measure(mk(15, 'h30, 3'b001, 31, 0, 0), 3);
    // queue lengths seen by the scheduler
    alloc_valid <= 1; alloc <= mk(1, 'h40, 3'b111, 2, 4, 1); outstanding['h40] = 1;
    @(posedge clk); alloc_valid <= 0; #1;
    `CHECK(slot_busy == 16'h0002, "slot of the CU's instruction marked busy")
    `CHECK(qlen[0] == 3'd2 && qlen[1] == 3'd1, $sformatf("qlen %0d %0d", qlen[0], qlen[1]))
    ex_ready <= 1;
    repeat (6) begin
      @(posedge clk); #1;
      if (ex_valid && ex_ready) check_dispatch();
    end
    // random stress
    for (int it = 0; it < 3000; it++) begin
      logic issue_now;
      int ws, wr;
      logic rdy;
      issue_t a;
      #1;
      rdy = ($urandom % 3) != 0;
      ex_ready <= rdy;
      if (ex_valid && rdy) check_dispatch();
      if (qlen[0] > 1 || qlen[1] > 1) conflicts++;
      issue_now = cu_free && ($urandom % 4 != 0) && it < 2800;
      a = mk($urandom % 16, 'h1000 + it, 3'($urandom), $urandom % 32, $urandom % 32, $urandom % 32);
      alloc_valid <= issue_now; alloc <= a;
      if (issue_now) outstanding[int'(a.pc)] = 1;
      // occasional write-back of the same pattern must not disturb reads
      wb_valid <= ($urandom % 8) == 0;
      ws = $urandom % 16; wr = $urandom % 32;
      wb_slot <= SLOT_W'(ws); wb_reg <= REG_W'(wr); wb_data <= pat(ws, wr);
      @(posedge clk);
    end
    wb_valid <= 0;
    repeat (20) @(posedge clk);
    #1;
    `CHECK(slot_busy == '0, "no slot busy when drained")
    `CHECK(outstanding.size() == 0, $sformatf("%0d instructions never dispatched", outstanding.size()))
    `CHECK(conflicts > 0, "bank conflicts exercised")
    $display("dispatched %0d, cycles with a bank queue over 1: %0d", dispatched, conflicts);
    `TB_FINISH
  end
endmodule
