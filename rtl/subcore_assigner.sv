// subcore_assigner: hashed sub-core warp assignment.
//
// Decides which of the four sub-cores receives each warp loaded into the SM.
// A 2-bit counter picks one of the four hash function table entries through a
// 4:1 multiplexer; the entry's two nibbles go into two 4-bit shift registers
// whose output bits are select lines 0 and 1 of the sub-core multiplexer.
// Every assigned warp (`advance`) shifts both registers; every fourth warp
// also advances the counter, so a new entry is used every four warps and the
// table wraps after sixteen warps. `subcore` is valid combinationally in the
// cycle the warp is written and applies to that warp.
// Following the architecture: the counter, table, multiplexer and shift
// registers and their roles. This design's choices: a 2-bit count of the warp
// position inside its group (the text requires counting to four but shows no
// counter for it), the counters running across thread blocks (W in the
// skewed round-robin formula counts all warps previously allocated to the SM),
// and the reset value of the table.
module subcore_assigner
  import sc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // hash function table write port
  input  logic            tbl_wr_en,
  input  logic [1:0]      tbl_wr_idx,
  input  logic [7:0]      tbl_wr_data,
  // a warp PC is written in this cycle
  input  logic            advance,
  output logic [SC_W-1:0] subcore
);
  logic [1:0] entry_sel;
  logic [1:0] pos;
  logic [7:0] entry;
  logic       sel0, sel1;
  logic       group_start;

  assign group_start = (pos == 2'd0);

  assign_counter #(.WIDTH(2)) u_counter (
    .clk, .rst_n, .inc(advance && pos == 2'd3), .count(entry_sel)
  );

  hash_function_table #(.ENTRIES(4)) u_table (
    .clk, .rst_n,
    .wr_en(tbl_wr_en), .wr_idx(tbl_wr_idx), .wr_data(tbl_wr_data),
    .rd_idx(entry_sel), .rd_data(entry)
  );

  warp_shift_register #(.WIDTH(4)) u_sr0 (
    .clk, .rst_n, .load(group_start), .shift(advance), .din(entry[7:4]), .dout(sel0)
  );
  warp_shift_register #(.WIDTH(4)) u_sr1 (
    .clk, .rst_n, .load(group_start), .shift(advance), .din(entry[3:0]), .dout(sel1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       pos <= '0;
    else if (advance) pos <= pos + 1'b1;
  end

  assign subcore = {sel1, sel0};
endmodule
