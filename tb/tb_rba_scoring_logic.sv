// Testbench for rba_scoring_logic: the worked case of two operands in bank 0
// and one in bank 1 (score = 2*len(q0) + len(q1)), then random queue lengths
// and instructions against a software sum, including invalid operands.
`include "tb_check.svh"
module tb_rba_scoring_logic;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen;
  insn_t [TABLE_ENTRIES-1:0] insn;
  logic [TABLE_ENTRIES-1:0][SCORE_W-1:0] score;
  rba_scoring_logic #(.ENTRIES(TABLE_ENTRIES)) dut (.qlen, .insn, .score);
  initial begin
    #100000; failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    insn = '0;
    qlen[0] = 3'd5; qlen[1] = 3'd2;
    insn[0].src_valid = 3'b111;
    insn[0].src[0] = 8'd4; insn[0].src[1] = 8'd7; insn[0].src[2] = 8'd10;
    #1;
    `CHECK(score[0] == 5'd12, $sformatf("worked example got %0d", score[0]))
    `CHECK(score[1] == 5'd0, "no operands scores zero")
    for (int it = 0; it < 300; it++) begin
      for (int b = 0; b < NUM_BANKS; b++) qlen[b] = QLEN_W'($urandom % 7);
      for (int e = 0; e < TABLE_ENTRIES; e++) begin
        insn[e] = insn_t'({$urandom, $urandom});
      end
      #1;
      for (int e = 0; e < TABLE_ENTRIES; e++) begin
        int exp;
        exp = 0;
        for (int s = 0; s < NUM_SRC; s++)
          if (insn[e].src_valid[s]) exp += int'(qlen[insn[e].src[s] % 2]);
        `CHECK(int'(score[e]) == exp, $sformatf("entry %0d got %0d exp %0d", e, score[e], exp))
      end
    end
    `TB_FINISH
  end
endmodule
