// Testbench for subcore_assigner: drives warp assignments with random gaps
// and compares the chosen sub-core with models of three hash functions:
//  * reset table = skewed round robin, subcore = (W + W/4) mod 4;
//  * table of 8'hAC in every entry = plain round robin, W mod 4;
//  * a random permutation per entry (Random Shuffle), whose sub-core counts
//    must never differ by more than one after each complete group of four.
// W counts all warps assigned since reset, so the 17th warp reuses entry 0.
`include "tb_check.svh"
module tb_subcore_assigner;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tbl_wr_en = 0, advance = 0;
  logic [1:0] tbl_wr_idx = 0, subcore;
  logic [7:0] tbl_wr_data = 0;
  int W = 0;
  int perm [4][4];
  int cnt [4];
  always #5 clk = ~clk;
  subcore_assigner dut (.clk, .rst_n, .tbl_wr_en, .tbl_wr_idx, .tbl_wr_data, .advance, .subcore);

  task automatic assign_one(input int expected, input string what);
    int n;
    n = $urandom % 3;
    if (n > 0) begin
      advance <= 0;
      repeat (n) @(posedge clk);
    end
    advance <= 1; #1;
    `CHECK(int'(subcore) == expected, $sformatf("%s W=%0d got %0d exp %0d", what, W, subcore, expected))
    cnt[subcore]++;
    @(posedge clk);
    W++;
  endtask

  function automatic logic [7:0] encode(input int p [4]);
    logic [3:0] s0, s1;
    for (int j = 0; j < 4; j++) begin
      s0[j] = p[j][0];
      s1[j] = p[j][1];
    end
    return {s0, s1};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    // skewed round robin from reset, 64 warps (table wraps every 16)
    for (int i = 0; i < 64; i++) assign_one((W + W / 4) % 4, "SRR");
    // round robin
    for (int e = 0; e < 4; e++) begin
      advance <= 0; tbl_wr_en <= 1; tbl_wr_idx <= 2'(e); tbl_wr_data <= 8'hAC; @(posedge clk);
    end
    tbl_wr_en <= 0;
    for (int i = 0; i < 32; i++) assign_one(W % 4, "RR");
    // random shuffle: each entry a random permutation of the sub-cores
    for (int r = 0; r < 5; r++) begin
      for (int e = 0; e < 4; e++) begin
        int p [4];
        for (int j = 0; j < 4; j++) p[j] = j;
        for (int j = 3; j > 0; j--) begin
          int k, t;
          k = $urandom % (j + 1); t = p[j]; p[j] = p[k]; p[k] = t;
        end
        perm[e] = p;
        advance <= 0; tbl_wr_en <= 1; tbl_wr_idx <= 2'(e); tbl_wr_data <= encode(p); @(posedge clk);
      end
      tbl_wr_en <= 0;
      for (int s = 0; s < 4; s++) cnt[s] = 0;
      for (int i = 0; i < 16; i++) begin
        assign_one(perm[(W / 4) % 4][W % 4], "shuffle");
        if (W % 4 == 0) begin
          int mx, mn;
          mx = 0; mn = 1000;
          for (int s = 0; s < 4; s++) begin
            if (cnt[s] > mx) mx = cnt[s];
            if (cnt[s] < mn) mn = cnt[s];
          end
          `CHECK(mx - mn <= 1, "shuffle balance")
        end
      end
    end
    `TB_FINISH
  end
endmodule
