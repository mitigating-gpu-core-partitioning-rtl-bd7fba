// Testbench for warp_selection_logic: random valid masks and keys (with
// many ties) against a linear search for the lowest key, lowest index on a
// tie; also the empty case and an odd, non-power-of-two size.
`include "tb_check.svh"
module tb_warp_selection_logic;
  int checks = 0, failures = 0;
  localparam int N = 16, KW = 13;
  logic [N-1:0] valid;
  logic [N-1:0][KW-1:0] key;
  logic found; logic [3:0] idx;
  logic [4:0] v5; logic [4:0][KW-1:0] k5; logic f5; logic [2:0] i5;
  warp_selection_logic #(.N(N), .KEY_W(KW)) dut (.valid, .key, .found, .idx);
  warp_selection_logic #(.N(5), .KEY_W(KW)) dut5 (.valid(v5), .key(k5), .found(f5), .idx(i5));
  initial begin
    #100000; failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    valid = '0; key = '0; v5 = '0; k5 = '0; #1;
    `CHECK(!found, "nothing valid")
    for (int it = 0; it < 500; it++) begin
      int best, bi;
      valid = N'($urandom);
      for (int i = 0; i < N; i++) key[i] = KW'($urandom % ((it % 2) ? 8 : 8192));
      v5 = 5'($urandom);
      for (int i = 0; i < 5; i++) k5[i] = KW'($urandom % 4);
      #1;
      best = -1; bi = 0;
      for (int i = 0; i < N; i++)
        if (valid[i] && (best < 0 || int'(key[i]) < best)) begin best = int'(key[i]); bi = i; end
      `CHECK(found == (valid != 0), "found")
      if (valid != 0) `CHECK(int'(idx) == bi, $sformatf("idx %0d exp %0d", idx, bi))
      best = -1; bi = 0;
      for (int i = 0; i < 5; i++)
        if (v5[i] && (best < 0 || int'(k5[i]) < best)) begin best = int'(k5[i]); bi = i; end
      if (v5 != 0) `CHECK(int'(i5) == bi, $sformatf("N=5 idx %0d exp %0d", i5, bi))
    end
    `TB_FINISH
  end
endmodule
