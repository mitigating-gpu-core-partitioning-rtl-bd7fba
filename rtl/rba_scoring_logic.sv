// rba_scoring_logic: register-bank-aware (RBA) score of every warp PC table
// entry.
//
// The score of an entry is the sum, over the valid source operands of its
// decoded instruction, of the request-queue length of the bank holding that
// operand. An instruction with two operands in bank 0 and one in bank 1 thus
// scores 2*len(q0) + len(q1). A low score means the instruction's banks are
// lightly contended. The sum saturates at the 5-bit maximum (with two CUs and
// three operands a queue holds at most six requests, so three operands score
// at most 18 and saturation never triggers at the default sizes).
// Purely combinational; the warp PC table registers the result. Bank of a
// register = register id mod number of banks (this design's mapping).
module rba_scoring_logic
  import sc_pkg::*;
#(
  parameter int ENTRIES = TABLE_ENTRIES
) (
  input  logic [NUM_BANKS-1:0][QLEN_W-1:0]  qlen,
  input  insn_t [ENTRIES-1:0]               insn,
  output logic [ENTRIES-1:0][SCORE_W-1:0]   score
);
  localparam int MAX_SCORE = (1 << SCORE_W) - 1;

  always_comb begin
    int unsigned sum;
    for (int e = 0; e < ENTRIES; e++) begin
      sum = 0;
      for (int s = 0; s < NUM_SRC; s++) begin
        if (insn[e].src_valid[s]) sum += 32'(qlen[bank_of(insn[e].src[s])]);
      end
      score[e] = (sum > MAX_SCORE) ? SCORE_W'(MAX_SCORE) : SCORE_W'(sum);
    end
  end
endmodule
