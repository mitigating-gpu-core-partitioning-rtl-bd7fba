// bank_arbiter: arbitration unit of one register file bank.
//
// Every source operand of every collector unit has a dedicated request port
// with a ready-valid handshake. A port's `req_valid` is high while its
// operand waits for this bank; the arbiter grants one request per cycle
// (the bank has one read port) by raising that port's `req_ready` in the same
// cycle, and reports the granted port on `grant_valid`/`grant_port`.
// The bank's request-queue length is simply the number of ports holding a
// valid request, which is what the RBA scheduler reads on `qlen`.
// Grant priority rotates (round robin, starting after the last granted port);
// the rotation is this design's choice, the rest follows the architecture.
module bank_arbiter #(
  parameter int NPORTS = 6,
  parameter int PORT_W = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  parameter int QLEN_W = $clog2(NPORTS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req_valid,
  output logic [NPORTS-1:0] req_ready,
  output logic              grant_valid,
  output logic [PORT_W-1:0] grant_port,
  output logic [QLEN_W-1:0] qlen
);
  logic [PORT_W-1:0] ptr;

  always_comb begin
    grant_valid = 1'b0;
    grant_port  = '0;
    req_ready   = '0;
    qlen        = '0;
    for (int i = 0; i < NPORTS; i++) qlen += QLEN_W'(req_valid[i]);
    for (int k = NPORTS - 1; k >= 0; k--) begin
      if (req_valid[(int'(ptr) + k) % NPORTS]) begin
        grant_valid = 1'b1;
        grant_port  = PORT_W'((int'(ptr) + k) % NPORTS);
      end
    end
    if (grant_valid) req_ready[grant_port] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (grant_valid)
      ptr <= (int'(grant_port) == NPORTS - 1) ? '0 : grant_port + 1'b1;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(req_ready) && ((req_ready & ~req_valid) == '0));
endmodule
