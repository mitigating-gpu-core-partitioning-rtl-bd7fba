// rf_bank: one bank of a sub-core's register file.
//
// A sub-core holds 64 KB of registers in two banks, so a bank is 32 KB: 256
// rows, each row one warp register (32 threads x 4 bytes = 1024 bits). The
// bank has one read port and one write port. A read issued with `rd_en`
// returns the row on `rd_data` after the next rising edge (one-cycle
// synchronous read, as an SRAM macro would); a write with `wr_en` lands on
// the same edge. Reading a row written in the same cycle returns the old
// contents. The bank size follows the architecture; the port arrangement and
// timing are this design's choice. Contents are not reset.
module rf_bank
  import sc_pkg::*;
#(
  parameter int ROWS   = BANK_ROWS,
  parameter int WIDTH  = VREG_W,
  parameter int ADDR_W = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data
);
  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
