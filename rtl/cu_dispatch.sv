// cu_dispatch: round-robin dispatch of ready collector units to the
// execution units.
//
// Among the collector units whose operands are all ready (`cu_valid`), one
// is chosen per cycle, rotating priority starting after the last one sent,
// and its instruction with operands is driven through the output
// multiplexer onto `ex_valid`/`ex`. When the execution units accept
// (`ex_ready`), `cu_ack` tells the chosen CU to free itself on that edge.
// Round-robin dispatch and the multiplexer are those of the architecture;
// the handshake is this design's.
module cu_dispatch
  import sc_pkg::*;
#(
  parameter int NCU  = NUM_CUS,
  parameter int CU_W = (NCU > 1) ? $clog2(NCU) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NCU-1:0]       cu_valid,
  input  dispatch_t [NCU-1:0]  cu_data,
  output logic [NCU-1:0]       cu_ack,
  output logic                 ex_valid,
  output dispatch_t            ex,
  input  logic                 ex_ready
);
  logic [CU_W-1:0] ptr, pick;

  always_comb begin
    ex_valid = 1'b0;
    pick     = '0;
    for (int k = NCU - 1; k >= 0; k--) begin
      if (cu_valid[(int'(ptr) + k) % NCU]) begin
        ex_valid = 1'b1;
        pick     = CU_W'((int'(ptr) + k) % NCU);
      end
    end
    ex     = cu_data[pick];
    cu_ack = '0;
    if (ex_valid && ex_ready) cu_ack[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (ex_valid && ex_ready)
      ptr <= (int'(pick) == NCU - 1) ? '0 : pick + 1'b1;
  end
endmodule
