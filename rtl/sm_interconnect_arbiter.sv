// sm_interconnect_arbiter: the SM side of thread-block launch and
// completion, as far as warps are concerned.
//
// Launch: a message from the thread block scheduler (`launch_*`: thread-block
// slot, warp count, start PC) is accepted when the previous block has been
// fully loaded. The arbiter then writes one warp PC per cycle into a sub-core
// warp PC table, through the sub-core multiplexer: the destination is the
// `assign_subcore` value given by the hashed assignment unit, and
// `assign_advance` tells that unit a warp was written so it moves on. If the
// chosen sub-core's table is full the load waits (the assignment is never
// changed to another sub-core). Each warp gets the lowest free SM warp id
// (0..63, the SM holds at most 64 warps); ids return to the pool when their
// thread block completes.
// Completion: every sub-core reports exiting warps (`warp_done_*`). Per
// thread-block slot the arbiter counts warps still running; when the count
// reaches zero the block's slot is reported on `tb_done_*` (one per cycle),
// which both tells the thread block scheduler and frees the block's warp
// table entries in all sub-cores: resources are released only for whole
// thread blocks. Register file, shared memory and constant memory allocation
// at launch are not modelled.
// The one-warp-per-cycle rate, message layout and slot count are this
// design's choices.
module sm_interconnect_arbiter
  import sc_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  // thread block scheduler
  input  logic                                  launch_valid,
  input  tb_launch_t                            launch,
  output logic                                  launch_ready,
  output logic                                  tb_done_valid,
  output logic [TB_W-1:0]                       tb_done_tb,
  // hashed sub-core assignment
  output logic                                  assign_advance,
  input  logic [SC_W-1:0]                       assign_subcore,
  // warp PC load through the sub-core multiplexer
  output logic [NUM_SUBCORES-1:0]               load_valid,
  output warp_load_t                            load,
  input  logic [NUM_SUBCORES-1:0]               load_ready,
  output logic                                  load_stall,
  // warp exits
  input  logic [NUM_SUBCORES-1:0]               warp_done_valid,
  input  logic [NUM_SUBCORES-1:0][TB_W-1:0]     warp_done_tb
);
  logic                     busy;
  logic [TB_W-1:0]          cur_tb;
  logic [PC_W-1:0]          cur_pc;
  logic [NWARP_W-1:0]       remaining;
  logic [WID_W-1:0]         next_wid;
  logic                     wid_avail;
  logic [MAX_WARPS_SM-1:0]  wid_used;
  logic [MAX_WARPS_SM-1:0][TB_W-1:0] wid_tb;
  logic [TB_SLOTS-1:0][NWARP_W-1:0] running;
  logic [TB_SLOTS-1:0]      pending;
  logic                     accept;

  assign launch_ready = !busy;
  assign accept       = launch_valid && !busy && launch.nwarps != '0;

  // lowest free SM warp id
  always_comb begin
    wid_avail = 1'b0;
    next_wid  = '0;
    for (int w = MAX_WARPS_SM - 1; w >= 0; w--) begin
      if (!wid_used[w]) begin
        wid_avail = 1'b1;
        next_wid  = WID_W'(w);
      end
    end
  end

  // sub-core multiplexer: route the current warp PC to the selected table
  always_comb begin
    load_valid = '0;
    if (busy && wid_avail) load_valid[assign_subcore] = 1'b1;
  end
  assign load.warp_id    = next_wid;
  assign load.tb         = cur_tb;
  assign load.pc         = cur_pc;
  assign assign_advance  = busy && wid_avail && load_ready[assign_subcore];
  assign load_stall      = busy && !(wid_avail && load_ready[assign_subcore]);

  // lowest completed thread block is reported first
  always_comb begin
    tb_done_valid = 1'b0;
    tb_done_tb    = '0;
    for (int t = TB_SLOTS - 1; t >= 0; t--) begin
      if (pending[t]) begin
        tb_done_valid = 1'b1;
        tb_done_tb    = TB_W'(t);
      end
    end
  end

  always_ff @(posedge clk) begin
    logic [NWARP_W-1:0] dec;
    if (!rst_n) begin
      busy      <= 1'b0;
      cur_tb    <= '0;
      cur_pc    <= '0;
      remaining <= '0;
      wid_used  <= '0;
      wid_tb    <= '0;
      running   <= '0;
      pending   <= '0;
    end else begin
      if (accept) begin
        busy      <= 1'b1;
        cur_tb    <= launch.tb;
        cur_pc    <= launch.pc;
        remaining <= launch.nwarps;
      end else if (assign_advance) begin
        remaining <= remaining - 1'b1;
        if (remaining == NWARP_W'(1)) busy <= 1'b0;
      end
      for (int t = 0; t < TB_SLOTS; t++) begin
        dec = '0;
        for (int s = 0; s < NUM_SUBCORES; s++)
          if (warp_done_valid[s] && int'(warp_done_tb[s]) == t) dec = dec + 1'b1;
        if (accept && int'(launch.tb) == t) begin
          running[t] <= launch.nwarps;
        end else if (dec != '0) begin
          running[t] <= running[t] - dec;
          if (running[t] == dec) pending[t] <= 1'b1;
        end
        if (tb_done_valid && int'(tb_done_tb) == t) pending[t] <= 1'b0;
      end
      for (int w = 0; w < MAX_WARPS_SM; w++) begin
        if (tb_done_valid && wid_used[w] && wid_tb[w] == tb_done_tb) wid_used[w] <= 1'b0;
      end
      if (assign_advance) begin
        wid_used[next_wid] <= 1'b1;
        wid_tb[next_wid]   <= cur_tb;
      end
    end
  end

  a_load_one_hot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(load_valid));
endmodule
