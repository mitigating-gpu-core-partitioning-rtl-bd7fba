// hash_function_table: the 4-entry, 1-byte-per-entry table that encodes the
// sub-core assignment of consecutive groups of four warps, together with the
// 4:1 multiplexer that reads the entry chosen by the 2-bit counter.
//
// Entry layout: bits [7:4] give select line 0 and bits [3:0] give select line
// 1 of the sub-core multiplexer for the four warps of a group (bit j for warp
// j of the group). Software fills the table through the write port
// (`wr_en`, `wr_idx`, `wr_data`, written on the rising edge); reads are
// combinational. The table size and layout follow the architecture. Reset
// loads the skewed round-robin pattern subcore = (W + W/4) mod 4, entry e
// sending warp j of its group to sub-core (j + e) mod 4; choosing that reset
// content is this design's decision.
module hash_function_table #(
  parameter int ENTRIES = 4,
  parameter int IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [7:0]       wr_data,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [7:0]       rd_data
);
  logic [7:0] table_q [ENTRIES];

  // Skewed round-robin entry: warp j of group e goes to (j + e) mod 4.
  function automatic logic [7:0] srr_entry(input int e);
    logic [3:0] s0, s1;
    logic [1:0] sc;
    for (int j = 0; j < 4; j++) begin
      sc    = 2'((j + e) % 4);
      s0[j] = sc[0];
      s1[j] = sc[1];
    end
    return {s0, s1};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) table_q[e] <= srr_entry(e);
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_data;
    end
  end

  assign rd_data = table_q[rd_idx];
endmodule
