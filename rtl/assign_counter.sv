// assign_counter: the 2-bit binary up-counter of the sub-core assignment path.
//
// In the hashed assignment unit the counter selects which entry of the hash
// function table feeds the shift registers, and it advances once every fourth
// assigned warp (the caller raises `inc` on that warp). Wrapping from 3 to 0
// makes the table repeat, so warp 17 reuses the pattern of entry 0.
// Interface: `inc` advances the count on the next rising clock edge; `count`
// is the registered value. Synchronous active-low reset to zero (reset value
// is this design's choice).
module assign_counter #(
  parameter int WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n)   count <= '0;
    else if (inc) count <= count + 1'b1;
  end
endmodule
