// warp_shift_register: one of the two 4-bit shift registers that drive the
// select lines of the sub-core multiplexer in the hashed assignment unit.
//
// At the first warp of a group of four (`load`), the register takes one
// nibble of the selected hash table entry; every assigned warp (`shift`)
// consumes one bit, least significant bit first. `dout` is the select bit for
// the warp being assigned in this cycle: with `load` high it is din[0]
// directly, otherwise the low bit of the stored value. With load and shift in
// the same cycle the register keeps din shifted by one, so the next warp sees
// din[1]. The bit order (LSB first) and the bypass of the load value are this
// design's choices; the 4-bit width and one shift per warp follow the
// architecture. Synchronous active-low reset to zero.
module warp_shift_register #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic             dout
);
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] cur;

  assign cur  = load ? din : q;
  assign dout = cur[0];

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= cur >> 1;
    else if (load)  q <= din;
  end
endmodule
