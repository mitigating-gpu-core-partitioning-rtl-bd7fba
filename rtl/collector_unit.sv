// collector_unit: one collector unit (CU) of the operand collector.
//
// A CU stages one warp instruction while its source operands are read from
// the register file banks. It is allocated when the warp scheduler issues
// (`alloc_valid`, captured on the rising edge while the CU is free). For each
// source operand it keeps an operand entry: valid bit (operand present),
// ready bit (data arrived), register id and the 32 x 4-byte data of a warp
// register. From the cycle after allocation each valid, not-yet-granted
// operand raises `req_valid` towards the arbitration unit of its bank; the
// grant (`req_ready`) ends the request, and the data arrives on
// `opnd_wr_valid`/`opnd_wr_data` one cycle later. When every valid operand is
// ready, `dispatch_valid` rises with the instruction and its operands; the CU
// is freed on the edge where `dispatch_ack` is high.
// Entry contents and behaviour follow the architecture; the exact cycle
// timing is this design's.
module collector_unit
  import sc_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  // allocation
  input  logic                             alloc_valid,
  input  issue_t                           alloc,
  output logic                             busy,
  // bank read requests, one ready-valid port per source operand
  output logic [NUM_SRC-1:0]               req_valid,
  output logic [NUM_SRC-1:0][REG_W-1:0]    req_reg,
  output logic [SLOT_W-1:0]                req_slot,
  input  logic [NUM_SRC-1:0]               req_ready,
  // operand data from the crossbar
  input  logic [NUM_SRC-1:0]               opnd_wr_valid,
  input  logic [NUM_SRC-1:0][VREG_W-1:0]   opnd_wr_data,
  // dispatch to execution
  output logic                             dispatch_valid,
  output dispatch_t                        dispatch,
  input  logic                             dispatch_ack
);
  typedef struct packed {
    logic             valid;
    logic             ready;
    logic             granted;
    logic [REG_W-1:0] regid;
  } opnd_state_t;

  issue_t                         ins_q;
  opnd_state_t [NUM_SRC-1:0]      op_q;
  logic [NUM_SRC-1:0][VREG_W-1:0] data_q;
  logic                           all_ready;

  always_comb begin
    all_ready = busy;
    for (int s = 0; s < NUM_SRC; s++) begin
      req_valid[s] = busy && op_q[s].valid && !op_q[s].granted;
      req_reg[s]   = op_q[s].regid;
      if (op_q[s].valid && !op_q[s].ready) all_ready = 1'b0;
    end
  end

  assign req_slot       = ins_q.slot;
  assign dispatch_valid = all_ready;
  assign dispatch.iss   = ins_q;
  assign dispatch.opnd  = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      op_q <= '0;
    end else if (!busy) begin
      if (alloc_valid) begin
        busy  <= 1'b1;
        ins_q <= alloc;
        for (int s = 0; s < NUM_SRC; s++) begin
          op_q[s].valid   <= alloc.insn.src_valid[s];
          op_q[s].ready   <= 1'b0;
          op_q[s].granted <= 1'b0;
          op_q[s].regid   <= alloc.insn.src[s];
          if (!alloc.insn.src_valid[s]) data_q[s] <= '0;  // unused slots send zeros
        end
      end
    end else begin
      for (int s = 0; s < NUM_SRC; s++) begin
        if (req_valid[s] && req_ready[s]) op_q[s].granted <= 1'b1;
        if (opnd_wr_valid[s]) begin
          op_q[s].ready <= 1'b1;
          data_q[s]     <= opnd_wr_data[s];
        end
      end
      if (dispatch_valid && dispatch_ack) busy <= 1'b0;
    end
  end

  a_ack_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    dispatch_ack |-> dispatch_valid);
endmodule
