// Testbench for bank_arbiter: each port raises a request at random and
// holds it until granted. Checks: at most one grant per cycle and only to a
// requesting port, a grant every cycle some port requests, queue length =
// number of requesting ports, and round-robin fairness (no request waits
// more than NPORTS-1 cycles).
`include "tb_check.svh"
module tb_bank_arbiter;
  int checks = 0, failures = 0;
  localparam int NP = 6;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] req_valid = '0, req_ready;
  logic grant_valid; logic [2:0] grant_port; logic [2:0] qlen;
  int wait_cnt [NP];
  always #5 clk = ~clk;
  bank_arbiter #(.NPORTS(NP)) dut (.clk, .rst_n, .req_valid, .req_ready, .grant_valid, .grant_port, .qlen);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    logic [NP-1:0] nxt;
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int i = 0; i < NP; i++) wait_cnt[i] = 0;
    for (int it = 0; it < 1000; it++) begin
      #1;
      `CHECK(int'(qlen) == $countones(req_valid), "queue length")
      `CHECK($countones(req_ready) <= 1 && (req_ready & ~req_valid) == 0, "one grant to a requester")
      `CHECK(grant_valid == (req_valid != 0), "work conserving")
      if (grant_valid) `CHECK(req_ready[grant_port], "grant_port matches ready")
      nxt = req_valid & ~req_ready;
      for (int i = 0; i < NP; i++) begin
        if (req_valid[i] && !req_ready[i]) begin
          wait_cnt[i]++;
          `CHECK(wait_cnt[i] < NP, $sformatf("port %0d starved", i))
        end else wait_cnt[i] = 0;
        if (!nxt[i] && ($urandom % 4 != 0)) nxt[i] = 1'b1;
      end
      @(posedge clk);
      req_valid <= nxt;
    end
    `TB_FINISH
  end
endmodule
