// operand_collector: the operand collector of one sub-core, with its
// register file.
//
// Holds NCU collector units (two by default), one arbitration unit and one
// register file bank per bank (two), a crossbar from the banks to the CU
// operand slots, and round-robin dispatch to the execution units.
// Flow of one instruction:
//  cycle 0  the scheduler issues (`alloc_valid`); the lowest free CU takes it;
//  cycle 1+ each source operand requests its bank (bank = register id mod 2);
//           each bank grants one request per cycle, and reads the row;
//  +1       the row reaches the CU through the crossbar;
//  then     when all operands are present the CU competes for dispatch and
//           leaves on `ex_valid`/`ex` once `ex_ready` is seen.
// With no conflicts an instruction dispatches three cycles after its issue
// cycle; each extra request waiting on the same bank adds a cycle.
// The per-bank request-queue lengths (number of valid requests at each
// arbitration unit) are exported on `qlen` for the RBA scheduler; this is the
// only change the RBA scheme needs in the operand collector. If NCU is set
// above the package's NUM_CUS the exported lengths saturate at the largest
// value QLEN_W holds (7 for the default width).
// `slot_busy` marks the warp table slots with an instruction still in a CU.
// Results are written back through the `wb_*` port (one warp register per
// cycle); a register of table slot s lives in row s*16 + reg/2 of bank reg%2.
// Structure follows the architecture; bank mapping, row layout, timing and
// the write-back port are this design's choices.
module operand_collector
  import sc_pkg::*;
#(
  parameter int NCU = NUM_CUS
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // allocation from the warp scheduler
  input  logic                             alloc_valid,
  input  issue_t                           alloc,
  output logic                             cu_free,
  // table slots that still have an instruction in a CU
  output logic [TABLE_ENTRIES-1:0]         slot_busy,
  // request-queue lengths to the RBA scoring logic
  output logic [NUM_BANKS-1:0][QLEN_W-1:0] qlen,
  // dispatch to the execution units
  output logic                             ex_valid,
  output dispatch_t                        ex,
  input  logic                             ex_ready,
  // register write-back
  input  logic                             wb_valid,
  input  logic [SLOT_W-1:0]                wb_slot,
  input  logic [REG_W-1:0]                 wb_reg,
  input  vreg_t                            wb_data
);
  localparam int NPORTS = NCU * NUM_SRC;
  localparam int PORT_W = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int AQ_W   = $clog2(NPORTS + 1);
  localparam int QMAX   = (1 << QLEN_W) - 1;

  logic [NCU-1:0]                           busy;
  logic [NCU-1:0]                           alloc_sel;
  logic [NCU-1:0][NUM_SRC-1:0]              cu_req_valid;
  logic [NCU-1:0][NUM_SRC-1:0][REG_W-1:0]   cu_req_reg;
  logic [NCU-1:0][SLOT_W-1:0]               cu_req_slot;
  logic [NCU-1:0][NUM_SRC-1:0]              cu_req_ready;
  logic [NPORTS-1:0]                        port_valid;
  logic [NPORTS-1:0][VREG_W-1:0]            port_data;
  logic [NCU-1:0]                           cu_dvalid;
  dispatch_t [NCU-1:0]                      cu_dinfo;
  logic [NCU-1:0]                           cu_ack;

  logic [NUM_BANKS-1:0][NPORTS-1:0]         arb_valid, arb_ready;
  logic [NUM_BANKS-1:0]                     grant_valid;
  logic [NUM_BANKS-1:0][PORT_W-1:0]         grant_port;
  logic [NUM_BANKS-1:0][AQ_W-1:0]           arb_qlen;
  logic [NUM_BANKS-1:0][ROW_W-1:0]          rd_addr;
  logic [NUM_BANKS-1:0][VREG_W-1:0]         rd_data;
  logic [NUM_BANKS-1:0]                     rd_valid_q;
  logic [NUM_BANKS-1:0][PORT_W-1:0]         rd_tag_q;

  // lowest free CU takes the issued instruction
  always_comb begin
    alloc_sel = '0;
    cu_free   = 1'b0;
    for (int c = NCU - 1; c >= 0; c--) begin
      if (!busy[c]) begin
        cu_free   = 1'b1;
        alloc_sel = '0;
        alloc_sel[c] = 1'b1;
      end
    end
    if (!alloc_valid) alloc_sel = '0;
  end

  for (genvar c = 0; c < NCU; c++) begin : g_cu
    collector_unit u_cu (
      .clk, .rst_n,
      .alloc_valid(alloc_sel[c]), .alloc(alloc), .busy(busy[c]),
      .req_valid(cu_req_valid[c]), .req_reg(cu_req_reg[c]),
      .req_slot(cu_req_slot[c]), .req_ready(cu_req_ready[c]),
      .opnd_wr_valid(port_valid[c*NUM_SRC +: NUM_SRC]),
      .opnd_wr_data(port_data[c*NUM_SRC +: NUM_SRC]),
      .dispatch_valid(cu_dvalid[c]), .dispatch(cu_dinfo[c]),
      .dispatch_ack(cu_ack[c])
    );
  end

  always_comb begin
    slot_busy = '0;
    for (int c = 0; c < NCU; c++)
      if (busy[c]) slot_busy[cu_req_slot[c]] = 1'b1;
  end

  // route requests to the arbitration unit of their bank
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      for (int c = 0; c < NCU; c++)
        for (int s = 0; s < NUM_SRC; s++)
          arb_valid[b][c*NUM_SRC+s] = cu_req_valid[c][s] &&
                                      (int'(bank_of(cu_req_reg[c][s])) == b);
    cu_req_ready = '0;
    for (int c = 0; c < NCU; c++)
      for (int s = 0; s < NUM_SRC; s++)
        for (int b = 0; b < NUM_BANKS; b++)
          if (arb_ready[b][c*NUM_SRC+s]) cu_req_ready[c][s] = 1'b1;
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    bank_arbiter #(.NPORTS(NPORTS), .PORT_W(PORT_W), .QLEN_W(AQ_W)) u_arb (
      .clk, .rst_n,
      .req_valid(arb_valid[b]), .req_ready(arb_ready[b]),
      .grant_valid(grant_valid[b]), .grant_port(grant_port[b]),
      .qlen(arb_qlen[b])
    );

    // saturate when NCU is raised above the package's NUM_CUS
    assign qlen[b] = (int'(arb_qlen[b]) > QMAX) ? QLEN_W'(QMAX) : QLEN_W'(arb_qlen[b]);

    always_comb begin
      int c, s;
      c = int'(grant_port[b]) / NUM_SRC;
      s = int'(grant_port[b]) % NUM_SRC;
      rd_addr[b] = row_of(cu_req_slot[c], cu_req_reg[c][s]);
    end

    rf_bank u_bank (
      .clk,
      .rd_en(grant_valid[b]), .rd_addr(rd_addr[b]), .rd_data(rd_data[b]),
      .wr_en(wb_valid && int'(bank_of(wb_reg)) == b),
      .wr_addr(row_of(wb_slot, wb_reg)), .wr_data(wb_data)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        rd_valid_q[b] <= 1'b0;
        rd_tag_q[b]   <= '0;
      end else begin
        rd_valid_q[b] <= grant_valid[b];
        rd_tag_q[b]   <= grant_port[b];
      end
    end
  end

  operand_crossbar #(.NBANKS(NUM_BANKS), .NPORTS(NPORTS), .WIDTH(VREG_W),
                     .PORT_W(PORT_W)) u_xbar (
    .bank_valid(rd_valid_q), .bank_tag(rd_tag_q), .bank_data(rd_data),
    .port_valid(port_valid), .port_data(port_data)
  );

  cu_dispatch #(.NCU(NCU)) u_disp (
    .clk, .rst_n,
    .cu_valid(cu_dvalid), .cu_data(cu_dinfo), .cu_ack(cu_ack),
    .ex_valid, .ex, .ex_ready
  );

  a_alloc_has_cu: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_valid |-> cu_free);
endmodule
