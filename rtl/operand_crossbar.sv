// operand_crossbar: routes register bank read data to collector units.
//
// Each bank returns at most one row per cycle, tagged with the request port
// (collector unit x source operand) it was granted to. The crossbar delivers
// every returned row to the operand slot named by its tag: output port p is
// valid when some bank returns data tagged p, and carries that bank's data.
// Since each port waits on a single bank, no two banks return to the same
// port in one cycle. Purely combinational; a full crossbar as in the
// architecture, its structure here is this design's.
module operand_crossbar #(
  parameter int NBANKS = 2,
  parameter int NPORTS = 6,
  parameter int WIDTH  = 1024,
  parameter int PORT_W = (NPORTS > 1) ? $clog2(NPORTS) : 1
) (
  input  logic [NBANKS-1:0]             bank_valid,
  input  logic [NBANKS-1:0][PORT_W-1:0] bank_tag,
  input  logic [NBANKS-1:0][WIDTH-1:0]  bank_data,
  output logic [NPORTS-1:0]             port_valid,
  output logic [NPORTS-1:0][WIDTH-1:0]  port_data
);
  always_comb begin
    port_valid = '0;
    port_data  = '0;
    for (int p = 0; p < NPORTS; p++) begin
      for (int b = 0; b < NBANKS; b++) begin
        if (bank_valid[b] && int'(bank_tag[b]) == p) begin
          port_valid[p] = 1'b1;
          port_data[p]  = bank_data[b];
        end
      end
    end
  end
endmodule
