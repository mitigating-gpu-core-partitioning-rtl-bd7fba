// End-to-end testbench for sm_top at its default parameters (four
// sub-cores, 16-entry warp tables, two CUs and two 32 KB banks per
// sub-core). Behavioural models stand in for the parts outside the SM model:
// a thread-block scheduler that launches blocks, a front end per sub-core
// that answers fetches one cycle later from a program, and execution units
// that accept dispatches. Register files are preloaded through write-back
// with a pattern encoding sub-core, slot, register and lane.
//
// Part A, mixed workload under the reset (skewed round-robin) table: blocks
// of 32, 32 and 40 warps, the third one larger than the room left, so warp
// loads stall until a block retires. Checks every dispatched instruction
// (program order per warp, operand data), that every fetched instruction is
// dispatched once, that each sub-core gets a quarter of each block's warps,
// and that each block is reported done once.
// Part B, the unbalanced FMA microbenchmark (two blocks of 32 warps, every
// fourth warp runs 4096 FMA instructions, the others exit at once), run under round robin,
// skewed round robin and a random-shuffle table, and the balanced layout
// (warps 0..7 compute) under round robin. Round robin piles all compute
// warps on sub-core 0, so it must take at least 3x the cycles of skewed
// round robin; the balanced layout must run close to skewed round robin,
// and shuffle no slower than round robin.
// Every mechanism is counted and must occur: load stall, bank conflict
// (a bank queue of two or more), RBA reordering (a younger warp issued
// because of its score), all CUs busy, execution-unit backpressure, hash
// table wrap (warp 17 onward), thread-block completion.
`include "tb_check.svh"
module tb_sm_top;
  import sc_pkg::*;
  localparam int NS = NUM_SUBCORES;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic launch_valid = 0, launch_ready, tb_done_valid, load_stall;
  tb_launch_t launch = '0;
  logic [TB_W-1:0] tb_done_tb;
  logic hash_wr_en = 0;
  logic [1:0] hash_wr_idx = '0;
  logic [7:0] hash_wr_data = '0;
  logic [NS-1:0] fetch_valid, fetch_ready = '1, fill_valid = '0;
  logic [NS-1:0][SLOT_W-1:0] fetch_slot, fill_slot = '0;
  logic [NS-1:0][PC_W-1:0] fetch_pc;
  logic [NS-1:0][WID_W-1:0] fetch_wid;
  insn_t [NS-1:0] fill_insn = '0;
  logic [NS-1:0] ex_valid, ex_ready = '0, wb_valid = '0;
  dispatch_t [NS-1:0] ex;
  logic [NS-1:0][SLOT_W-1:0] wb_slot = '0;
  logic [NS-1:0][REG_W-1:0] wb_reg = '0;
  vreg_t [NS-1:0] wb_data = '0;

  always #5 clk = ~clk;

  sm_top dut (.clk, .rst_n, .launch_valid, .launch, .launch_ready,
    .tb_done_valid, .tb_done_tb, .load_stall,
    .hash_wr_en, .hash_wr_idx, .hash_wr_data,
    .fetch_valid, .fetch_slot, .fetch_pc, .fetch_wid, .fetch_ready,
    .fill_valid, .fill_slot, .fill_insn,
    .ex_valid, .ex, .ex_ready, .wb_valid, .wb_slot, .wb_reg, .wb_data);

  // ---------------------------------------------------------------- programs
  int workload = 0;      // 0 mixed, 1 unbalanced FMA, 2 balanced FMA
  int fma_len  = 4096;
  int eu_random = 1;

  function automatic int tb_of(input logic [PC_W-1:0] pc); return int'(pc[27:20]) - 1; endfunction
  function automatic int k_of(input logic [PC_W-1:0] pc); return int'(pc[19:0]) / PC_STEP; endfunction
  function automatic logic [PC_W-1:0] start_of(input int tb); return PC_W'((tb + 1) << 20); endfunction

  function automatic int plen(input int tb, input int w);
    int idx;
    idx = w % 32;
    case (workload)
      0: return 1 + (w * 3 + tb) % 6;
      1: return (idx % 4 == 0) ? fma_len : 0;
      default: return (idx < 8) ? fma_len : 0;
    endcase
  endfunction

  function automatic insn_t prog(input int tb, input int w, input int k);
    insn_t i;
    i = '0;
    if (k >= plen(tb, w)) begin i.opcode = OPC_EXIT; return i; end
    i.opcode = 8'h01; i.dst = 8'd30;
    if (workload == 0) begin
      i.src_valid = 3'((w + k + tb) % 7 + 1);
      for (int s = 0; s < NUM_SRC; s++) i.src[s] = REG_W'((w * 5 + k * 3 + s * 7 + tb) % 32);
    end else begin   // fused multiply-add: three register sources
      i.src_valid = 3'b111;
      for (int s = 0; s < NUM_SRC; s++) i.src[s] = REG_W'((k + s * 11) % 32);
    end
    return i;
  endfunction

  function automatic vreg_t pat(input int sc, input int slot, input int r);
    vreg_t v;
    for (int l = 0; l < 32; l++) v[l*32 +: 32] = 32'(sc * 268435456 + slot * 16777216 + r * 65536 + l);
    return v;
  endfunction

  // -------------------------------------------------------------- front end
  int fetched_ops = 0, fetched_exits = 0;
  int first_fetch [8][NS];
  always @(posedge clk) begin
    logic [NS-1:0] fv;
    logic [NS-1:0][SLOT_W-1:0] fs;
    insn_t [NS-1:0] fi;
    fv = '0; fs = '0; fi = '0;
    if (rst_n) begin
      for (int s = 0; s < NS; s++) begin
        if (fetch_valid[s] && fetch_ready[s]) begin
          int t, k;
          t = tb_of(fetch_pc[s]); k = k_of(fetch_pc[s]);
          fv[s] = 1'b1;
          fs[s] = fetch_slot[s];
          fi[s] = prog(t, int'(fetch_wid[s]), k);
          if (fi[s].opcode == OPC_EXIT) fetched_exits++; else fetched_ops++;
          if (k == 0 && t >= 0 && t < 8) first_fetch[t][s]++;
        end
      end
    end
    fill_valid <= fv; fill_slot <= fs; fill_insn <= fi;
  end

  // ------------------------------------------------------- execution units
  int executed = 0;
  int issued_per_sc [NS];
  int next_k [64];
  int last_tb [64];
  always @(posedge clk) begin
    logic [NS-1:0] rdy;
    if (rst_n) begin
      for (int s = 0; s < NS; s++) begin
        if (ex_valid[s] && ex_ready[s]) begin
          int w, t, k;
          w = int'(ex[s].iss.warp_id); t = tb_of(ex[s].iss.pc); k = k_of(ex[s].iss.pc);
          checks++;
          if (k != next_k[w] || ex[s].iss.insn != prog(t, w, k)) begin
            failures++;
            $display("FAIL %0t: sc %0d warp %0d tb %0d k=%0d exp %0d", $time, s, w, t, k, next_k[w]);
          end
          for (int o = 0; o < NUM_SRC; o++) begin
            checks++;
            if (ex[s].opnd[o] != (ex[s].iss.insn.src_valid[o] ?
                  pat(s, int'(ex[s].iss.slot), int'(ex[s].iss.insn.src[o])) : '0)) begin
              failures++; $display("FAIL %0t: sc %0d warp %0d operand %0d", $time, s, w, o);
            end
          end
          next_k[w] = k + 1; last_tb[w] = t;
          executed++; issued_per_sc[s]++;
        end
      end
      if (tb_done_valid)
        for (int w = 0; w < 64; w++) if (last_tb[w] == int'(tb_done_tb)) begin next_k[w] = 0; last_tb[w] = -1; end
    end
    for (int s = 0; s < NS; s++) rdy[s] = (eu_random != 0) ? (($urandom % 4) != 0) : 1'b1;
    ex_ready <= rdy;
  end

  // ------------------------------------------------------ mechanism counts
  int n_stall = 0, n_conflict = 0, n_reorder = 0, n_cu_full = 0, n_backpress = 0;
  int n_loaded = 0, n_tbdone = 0;
  int tb_done_seen [32];
  always @(posedge clk) if (rst_n) begin
    if (load_stall) n_stall++;
    if (dut.advance) n_loaded++;
    if (tb_done_valid) begin n_tbdone++; tb_done_seen[tb_done_tb]++; end
    for (int s = 0; s < NS; s++) if (ex_valid[s] && !ex_ready[s]) n_backpress++;
  end
  for (genvar s = 0; s < NS; s++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      logic [AGE_W-1:0] oldest;
      logic any_alu;
      if (dut.g_sc[s].u_sc.u_oc.qlen[0] >= 2 || dut.g_sc[s].u_sc.u_oc.qlen[1] >= 2) n_conflict++;
      oldest = '0; any_alu = 1'b0;
      for (int e = 0; e < TABLE_ENTRIES; e++) begin
        if (dut.g_sc[s].u_sc.u_sched.cand[e] && dut.g_sc[s].u_sc.u_sched.ent[e].age > oldest)
          oldest = dut.g_sc[s].u_sc.u_sched.ent[e].age;
        if (dut.g_sc[s].u_sc.u_sched.ent[e].valid && dut.g_sc[s].u_sc.u_sched.ent[e].insn_valid &&
            !dut.g_sc[s].u_sc.u_sched.ent[e].done &&
            dut.g_sc[s].u_sc.u_sched.ent[e].insn.opcode != OPC_EXIT) any_alu = 1'b1;
      end
      if (dut.g_sc[s].u_sc.u_sched.found &&
          dut.g_sc[s].u_sc.u_sched.ent[dut.g_sc[s].u_sc.u_sched.sel].age < oldest) n_reorder++;
      if (any_alu && !dut.g_sc[s].u_sc.u_sched.cu_free) n_cu_full++;
    end
  end

  // ------------------------------------------------------------- sequences
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic do_reset();
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 64; w++) begin next_k[w] = 0; last_tb[w] = -1; end
    for (int t = 0; t < 32; t++) tb_done_seen[t] = 0;
    for (int t = 0; t < 8; t++) for (int s = 0; s < NS; s++) first_fetch[t][s] = 0;
    for (int s = 0; s < NS; s++) issued_per_sc[s] = 0;
    executed = 0; fetched_ops = 0; fetched_exits = 0; n_tbdone = 0; n_loaded = 0;
    @(posedge clk);
  endtask

  task automatic preload();
    for (int sl = 0; sl < TABLE_ENTRIES; sl++)
      for (int r = 0; r < REGS_PER_WARP; r++) begin
        logic [NS-1:0][SLOT_W-1:0] ws; logic [NS-1:0][REG_W-1:0] wr; vreg_t [NS-1:0] wd;
        for (int s = 0; s < NS; s++) begin
          ws[s] = SLOT_W'(sl); wr[s] = REG_W'(r); wd[s] = pat(s, sl, r);
        end
        wb_valid <= '1; wb_slot <= ws; wb_reg <= wr; wb_data <= wd;
        @(posedge clk);
      end
    wb_valid <= '0;
  endtask

  task automatic write_table(input logic [7:0] e0, input logic [7:0] e1,
                             input logic [7:0] e2, input logic [7:0] e3);
    logic [7:0] v [4];
    v[0] = e0; v[1] = e1; v[2] = e2; v[3] = e3;
    for (int e = 0; e < 4; e++) begin
      hash_wr_en <= 1; hash_wr_idx <= 2'(e); hash_wr_data <= v[e];
      @(posedge clk);
    end
    hash_wr_en <= 0;
  endtask

  function automatic logic [7:0] perm_entry(input int p [4]);
    logic [3:0] s0, s1;
    for (int j = 0; j < 4; j++) begin s0[j] = p[j][0]; s1[j] = p[j][1]; end
    return {s0, s1};
  endfunction

  function automatic logic [7:0] rand_perm_entry();
    int p [4];
    for (int j = 0; j < 4; j++) p[j] = j;
    for (int j = 3; j > 0; j--) begin
      int k, t;
      k = $urandom % (j + 1); t = p[j]; p[j] = p[k]; p[k] = t;
    end
    return perm_entry(p);
  endfunction

  task automatic launch_tb(input int tb, input int n);
    launch_valid <= 1;
    launch <= '{tb: TB_W'(tb), nwarps: NWARP_W'(n), pc: start_of(tb)};
    @(posedge clk);
    while (!launch_ready) @(posedge clk);   // accepted on a ready edge
    launch_valid <= 0;
  endtask

  task automatic wait_done(input int n);
    int guard;
    guard = 0;
    while (n_tbdone < n && guard < 1000000) begin @(posedge clk); guard++; end
    repeat (30) @(posedge clk);
  endtask

  task automatic run_fma(input int wl, output int cycles);
    int t0;
    do_reset();
    workload = wl;
    eu_random = 0;
    t0 = int'($time / 10);
    launch_tb(0, 32);
    launch_tb(1, 32);
    while (n_tbdone < 2) @(posedge clk);
    cycles = int'($time / 10) - t0;
    repeat (10) @(posedge clk);
    `CHECK(executed == fetched_ops && executed == 8 * fma_len * 2,
           $sformatf("FMA: executed %0d fetched %0d", executed, fetched_ops))
  endtask

  initial begin
    int c_rr, c_srr, c_shuf, c_bal, c_srr_lat;
    real mean, var_, cv;
    do_reset();
    preload();
    // ---------------- part A
    workload = 0; eu_random = 1;
    launch_tb(0, 32);
    launch_tb(1, 32);
    launch_tb(2, 40);
    wait_done(3);
    `CHECK(n_tbdone == 3 && tb_done_seen[0] == 1 && tb_done_seen[1] == 1 && tb_done_seen[2] == 1,
           "each block reported done once")
    `CHECK(executed == fetched_ops, $sformatf("executed %0d of %0d fetched", executed, fetched_ops))
    `CHECK(fetched_exits == 104, $sformatf("every warp exited once (%0d)", fetched_exits))
    for (int s = 0; s < NS; s++) begin
      `CHECK(first_fetch[0][s] == 8 && first_fetch[1][s] == 8 && first_fetch[2][s] == 10,
             $sformatf("sub-core %0d warp share %0d %0d %0d", s, first_fetch[0][s], first_fetch[1][s], first_fetch[2][s]))
    end
    `CHECK(n_loaded == 104, "all warps loaded")
    $display("part A: %0d instructions", executed);
    // ---------------- part B
    write_table(8'hAC, 8'hAC, 8'hAC, 8'hAC);   // lost on reset: run_fma resets first
    do_reset();
    workload = 1; eu_random = 0;
    write_table(8'hAC, 8'hAC, 8'hAC, 8'hAC);
    begin
      int t0;
      t0 = int'($time / 10);
      launch_tb(0, 32); launch_tb(1, 32);
      while (n_tbdone < 2) @(posedge clk);
      c_rr = int'($time / 10) - t0;
    end
    repeat (10) @(posedge clk);
    `CHECK(issued_per_sc[0] == 16 * fma_len && issued_per_sc[1] == 0, "round robin piles compute warps on sub-core 0")
    run_fma(1, c_srr);
    mean = 0; for (int s = 0; s < NS; s++) mean += issued_per_sc[s]; mean /= NS;
    var_ = 0; for (int s = 0; s < NS; s++) var_ += (issued_per_sc[s] - mean) ** 2; var_ /= NS;
    cv = $sqrt(var_) / mean;
    `CHECK(cv < 0.01, $sformatf("skewed round robin balances issue (cv %f)", cv))
    // shuffle: random permutation per entry, programmed after reset
    do_reset();
    workload = 1;
    write_table(rand_perm_entry(), rand_perm_entry(), rand_perm_entry(), rand_perm_entry());
    begin
      int t0;
      t0 = int'($time / 10);
      launch_tb(0, 32); launch_tb(1, 32);
      while (n_tbdone < 2) @(posedge clk);
      c_shuf = int'($time / 10) - t0;
    end
    repeat (10) @(posedge clk);
    // balanced layout under round robin
    do_reset();
    workload = 2;
    write_table(8'hAC, 8'hAC, 8'hAC, 8'hAC);
    begin
      int t0;
      t0 = int'($time / 10);
      launch_tb(0, 32); launch_tb(1, 32);
      while (n_tbdone < 2) @(posedge clk);
      c_bal = int'($time / 10) - t0;
    end
    repeat (10) @(posedge clk);
    $display("FMA cycles: RR unbalanced %0d, SRR %0d, shuffle %0d, RR balanced %0d", c_rr, c_srr, c_shuf, c_bal);
    $display("RR/SRR slowdown %f", real'(c_rr) / real'(c_srr));
    `CHECK(c_rr >= 3 * c_srr, "imbalance costs at least 3x under round robin")
    `CHECK(c_bal <= c_srr + c_srr / 4 && c_srr <= c_bal + c_bal / 4, "balanced layout runs like skewed round robin")
    `CHECK(c_shuf <= c_rr, "shuffle no slower than round robin")
    $display("mechanisms: stall %0d conflict %0d reorder %0d cu_full %0d backpressure %0d loads %0d",
             n_stall, n_conflict, n_reorder, n_cu_full, n_backpress, n_loaded);
    `CHECK(n_stall > 0, "load stall happened")
    `CHECK(n_conflict > 0, "bank conflict happened")
    `CHECK(n_reorder > 0, "RBA reordering happened")
    `CHECK(n_cu_full > 0, "all CUs busy happened")
    `CHECK(n_backpress > 0, "execution backpressure happened")
    `TB_FINISH
  end
endmodule
