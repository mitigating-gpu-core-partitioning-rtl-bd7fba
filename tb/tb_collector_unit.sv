// Testbench for collector_unit: allocation, one request per valid operand,
// requests dropping when granted, data capture, dispatch only when every
// valid operand is ready, zeros for unused operand slots, no re-allocation
// while busy, and release on the dispatch acknowledge.
`include "tb_check.svh"
module tb_collector_unit;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, busy;
  issue_t alloc = '0;
  logic [NUM_SRC-1:0] req_valid, req_ready = '0, opnd_wr_valid = '0;
  logic [NUM_SRC-1:0][REG_W-1:0] req_reg;
  logic [SLOT_W-1:0] req_slot;
  logic [NUM_SRC-1:0][VREG_W-1:0] opnd_wr_data = '0;
  logic dispatch_valid, dispatch_ack = 0;
  dispatch_t dispatch;
  always #5 clk = ~clk;
  collector_unit dut (.clk, .rst_n, .alloc_valid, .alloc, .busy, .req_valid, .req_reg, .req_slot,
    .req_ready, .opnd_wr_valid, .opnd_wr_data, .dispatch_valid, .dispatch, .dispatch_ack);
  function automatic vreg_t pat(input int r, input int salt);
    vreg_t v;
    for (int l = 0; l < 32; l++) v[l*32 +: 32] = 32'(salt * 65536 + r * 256 + l);
    return v;
  endfunction
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk); #1;
    `CHECK(!busy && req_valid == 0 && !dispatch_valid, "idle after reset")
    for (int it = 0; it < 40; it++) begin
      issue_t a; logic [NUM_SRC-1:0] pending;
      a = '0;
      a.slot = SLOT_W'($urandom); a.pc = 32'(it * 16); a.warp_id = WID_W'(it);
      a.insn.opcode = 8'h01;
      a.insn.src_valid = 3'($urandom);
      for (int s = 0; s < NUM_SRC; s++) a.insn.src[s] = REG_W'($urandom);
      alloc_valid <= 1; alloc <= a;
      @(posedge clk);
      alloc_valid <= 1; alloc <= '0;   // must be ignored while busy
      #1;
      `CHECK(busy, "busy after allocation")
      `CHECK(req_valid == a.insn.src_valid && req_slot == a.slot, "one request per valid operand")
      for (int s = 0; s < NUM_SRC; s++) if (a.insn.src_valid[s]) `CHECK(req_reg[s] == a.insn.src[s], "register id")
      pending = a.insn.src_valid;
      while (pending != 0) begin
        logic [NUM_SRC-1:0] g;
        g = pending & NUM_SRC'($urandom);
        `CHECK(!dispatch_valid, "no dispatch before all operands ready")
        req_ready <= g; opnd_wr_valid <= 0;
        @(posedge clk);
        alloc_valid <= 0;
        req_ready <= 0;
        #1;
        `CHECK(req_valid == (pending & ~g), "granted requests drop")
        opnd_wr_valid <= g;
        for (int s = 0; s < NUM_SRC; s++) opnd_wr_data[s] <= pat(a.insn.src[s], it);
        pending = pending & ~g;
        if (pending != 0 || g != 0) begin
          @(posedge clk);
          opnd_wr_valid <= 0;
          #1;
        end
      end
      alloc_valid <= 0;
      @(posedge clk); #1;
      `CHECK(dispatch_valid, "dispatch when all ready")
      `CHECK(dispatch.iss == a, "instruction carried")
      for (int s = 0; s < NUM_SRC; s++)
        `CHECK(dispatch.opnd[s] == (a.insn.src_valid[s] ? pat(a.insn.src[s], it) : '0), $sformatf("operand %0d data", s))
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        `CHECK(dispatch_valid && busy, "held until acknowledged")
      end
      dispatch_ack <= 1; @(posedge clk); dispatch_ack <= 0; #1;
      `CHECK(!busy && !dispatch_valid, "freed after dispatch")
    end
    `TB_FINISH
  end
endmodule
