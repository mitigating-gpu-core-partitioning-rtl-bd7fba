// Testbench for subcore: 16 warps of two thread blocks run small programs to
// completion through one sub-core at its default size.
// Program of warp w: L(w) = 2 + (w mod 5) instructions, instruction k reading
// up to three registers chosen by a fixed formula, then EXIT. A front-end
// model answers each fetch one cycle later; an execution-unit model accepts
// dispatches at random. The register file is preloaded through write-back
// with a pattern encoding slot, register and lane. Checks: every dispatched
// instruction is the right one for its warp and PC, in program order, with
// operand data matching the pattern; every warp retires exactly once; and
// after the blocks are freed the table accepts new warps.
`include "tb_check.svh"
module tb_subcore;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load_valid = 0, load_ready;
  warp_load_t load = '0;
  logic fetch_valid, fetch_ready = 1;
  logic [SLOT_W-1:0] fetch_slot;
  logic [PC_W-1:0] fetch_pc;
  logic [WID_W-1:0] fetch_wid;
  logic fill_valid = 0;
  logic [SLOT_W-1:0] fill_slot = '0;
  insn_t fill_insn = '0;
  logic ex_valid, ex_ready = 0;
  dispatch_t ex;
  logic wb_valid = 0;
  logic [SLOT_W-1:0] wb_slot = '0;
  logic [REG_W-1:0] wb_reg = '0;
  vreg_t wb_data = '0;
  logic warp_done_valid, free_valid = 0;
  logic [TB_W-1:0] warp_done_tb, free_tb = '0;
  localparam logic [PC_W-1:0] START = 32'h0000_4000;
  int next_k [64];
  int done_cnt [2];
  int executed = 0, expected_total = 0;
  bit finished [64];

  always #5 clk = ~clk;
  subcore dut (.clk, .rst_n, .load_valid, .load, .load_ready,
    .fetch_valid, .fetch_slot, .fetch_pc, .fetch_wid, .fetch_ready,
    .fill_valid, .fill_slot, .fill_insn, .ex_valid, .ex, .ex_ready,
    .wb_valid, .wb_slot, .wb_reg, .wb_data,
    .warp_done_valid, .warp_done_tb, .free_valid, .free_tb);

  function automatic int plen(input int w); return 2 + w % 5; endfunction
  function automatic insn_t prog(input int w, input int k);
    insn_t i;
    i = '0;
    if (k >= plen(w)) begin i.opcode = OPC_EXIT; return i; end
    i.opcode = 8'h01; i.dst = 8'd31;
    i.src_valid = 3'((w + k) % 7 + 1);
    for (int s = 0; s < NUM_SRC; s++) i.src[s] = REG_W'((w * 7 + k * 3 + s * 5) % 32);
    return i;
  endfunction
  function automatic vreg_t pat(input int slot, input int r);
    vreg_t v;
    for (int l = 0; l < 32; l++) v[l*32 +: 32] = 32'(slot * 16777216 + r * 65536 + l);
    return v;
  endfunction

  // front end: one-cycle fetch latency
  always @(posedge clk) begin
    if (rst_n && fetch_valid && fetch_ready) begin
      fill_valid <= 1;
      fill_slot  <= fetch_slot;
      fill_insn  <= prog(int'(fetch_wid), int'((fetch_pc - START) / PC_STEP));
    end else fill_valid <= 0;
  end

  // execution units: random acceptance, check each dispatch
  always @(posedge clk) begin
    if (rst_n) begin
      if (ex_valid && ex_ready) begin
        int w, k;
        w = int'(ex.iss.warp_id);
        k = int'((ex.iss.pc - START) / PC_STEP);
        checks++;
        if (k != next_k[w] || ex.iss.insn != prog(w, k)) begin
          failures++; $display("FAIL %0t: warp %0d got k=%0d exp %0d", $time, w, k, next_k[w]);
        end
        for (int s = 0; s < NUM_SRC; s++) begin
          checks++;
          if (ex.opnd[s] != (ex.iss.insn.src_valid[s] ? pat(int'(ex.iss.slot), int'(ex.iss.insn.src[s])) : '0)) begin
            failures++; $display("FAIL %0t: warp %0d k=%0d operand %0d", $time, w, k, s);
          end
        end
        next_k[w] = k + 1;
        executed++;
      end
      ex_ready <= ($urandom % 4) != 0;
      if (warp_done_valid) done_cnt[warp_done_tb]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
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
    // load 16 warps: warps 0..7 in block 0, 8..15 in block 1
    for (int w = 0; w < 16; w++) begin
      next_k[w] = 0; expected_total += plen(w);
      load_valid <= 1; load <= '{warp_id: WID_W'(w), tb: TB_W'(w / 8), pc: START};
      #1; `CHECK(load_ready, "table has room")
      @(posedge clk);
    end
    load_valid <= 0; #1;
    `CHECK(!load_ready, "table full")
    while (done_cnt[0] + done_cnt[1] < 16) @(posedge clk);
    `CHECK(done_cnt[0] == 8 && done_cnt[1] == 8, "every warp retired once")
    // a warp retires when its EXIT issues; its last instruction may still
    // be in a collector unit
    repeat (20) @(posedge clk);
    `CHECK(executed == expected_total, $sformatf("executed %0d of %0d", executed, expected_total))
    repeat (5) @(posedge clk);
    `CHECK(done_cnt[0] == 8 && done_cnt[1] == 8, "no second retirement")
    `CHECK(!load_ready, "finished warps hold their entries until the block is freed")
    free_valid <= 1; free_tb <= 5'd0; @(posedge clk);
    free_valid <= 1; free_tb <= 5'd1; @(posedge clk);
    free_valid <= 0; #1;
    `CHECK(load_ready, "entries released with their block")
    $display("instructions executed: %0d", executed);
    `TB_FINISH
  end
endmodule
