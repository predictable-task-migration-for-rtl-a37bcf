// tb_mig_system: end-to-end test of the four-core migration system at its default
// size (4 cores, 8 KB 8-way L2s, D = 10, B = 2).
//
// Phase 1, single migrations: for every scheme a task's locked lines are moved from
// one core to another with a direct start; the measured delay is compared with the
// scheme's closed form, and the target L2 is read back through the core port: every
// line present, locked, with the task's PID and data, and the source copy unlocked.
// Phase 2, synchronised parallel migrations (three evaluated tasks, 47, 36 and 41
// lines, chains 1->2, 3->1, 0->3 with offsets 0, B, 2B): every chain must run
// conflict-free (no bus stall, no cache-port wait) although cores 1 and 3 are source
// and target at once, and each must take exactly its RCM / Slotted-SSCM delay after
// a 2B+D set-up. Phase 3: two unsynchronised streamed migrations started together,
// which must meet on the bus, be serialised and still deliver all lines.
// Each mechanism is counted and a failure is counted for one that never happened.
module tb_mig_system;
  import mig_pkg::*;

  localparam int unsigned NC = NUM_CORES;
  localparam int unsigned D  = D_CYC;
  localparam int unsigned B  = B_CYC;
  localparam int unsigned S  = L2_SETS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cpu_req_valid [NC], cpu_req_ready [NC], cpu_req_lock [NC];
  cache_op_e cpu_req_op [NC];
  logic [ADDR_W-1:0] cpu_req_addr [NC];
  logic [PID_W-1:0] cpu_req_pid [NC];
  logic [LINE_W-1:0] cpu_req_data [NC];
  logic cpu_rsp_valid [NC], cpu_rsp_hit [NC], cpu_rsp_locked [NC];
  logic [PID_W-1:0] cpu_rsp_pid [NC];
  logic [LINE_W-1:0] cpu_rsp_data [NC];
  logic start [NC];
  mig_mode_e start_mode [NC];
  logic [CORE_W-1:0] start_target [NC];
  logic [PID_W-1:0] start_pid [NC];
  region_t [NUM_RR-1:0] start_regions [NC];
  logic ctx_we [NC];
  target_ctx_t ctx_in [NC];
  logic arm = 0;
  logic src_busy [NC], src_done [NC], tgt_started [NC];
  logic [CNT_W-1:0] mig_cycles [NC], lines_pushed [NC], line_reads [NC], set_reads [NC],
                    fake_reads [NC], added_delays [NC], skipped_reads [NC],
                    lines_installed [NC], install_fail [NC], t_first [NC], init_cycle [NC],
                    port_waits [NC];
  logic [CNT_W-1:0] stall_cycles, msg_count;
  logic [NC:0] tdma_grant;
  logic tdma_slot_start, tdma_mig_slot;
  logic [CORE_W:0] tdma_n_mig, tdma_mig_idx;
  int n_tdma_mig = 0, max_n_mig = 0;
  always @(posedge clk) if (rst_n && tdma_slot_start && tdma_mig_slot) begin
    n_tdma_mig++;
    if (int'(tdma_n_mig) > max_n_mig) max_n_mig = int'(tdma_n_mig);
  end

  mig_system dut (.*);

  // mechanism counters
  int n_mode [6];
  int n_parallel = 0, n_src_and_tgt = 0, n_init = 0, n_skip = 0, n_fake = 0,
      n_added = 0, n_multi = 0, n_stall = 0;

  function automatic logic [LINE_W-1:0] pattern(input logic [ADDR_W-1:0] a, input logic [PID_W-1:0] p);
    return {8{a}} ^ (LINE_W'(p) << 32) ^ LINE_W'(32'h5A5A_0F0F);
  endfunction

  task automatic cpu(input int c, input cache_op_e op, input logic [ADDR_W-1:0] a,
                     input logic [PID_W-1:0] p, input logic lock);
    @(negedge clk);
    cpu_req_valid[c] = 1; cpu_req_op[c] = op; cpu_req_addr[c] = a; cpu_req_pid[c] = p;
    cpu_req_lock[c] = lock; cpu_req_data[c] = pattern(a, p);
    #1;
    while (!cpu_req_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    cpu_req_valid[c] = 0;
    while (!cpu_rsp_valid[c]) @(negedge clk);
  endtask

  task automatic fill(input int c, input logic [ADDR_W-1:0] base, input int n, input logic [PID_W-1:0] p);
    for (int i = 0; i < n; i++) cpu(c, OP_INSTALL, base + ADDR_W'(i * LINE_BYTES), p, 1'b1);
  endtask

  task automatic verify_target(input int src, input int tgt, input logic [ADDR_W-1:0] base,
                               input int n, input logic [PID_W-1:0] p, input string name);
    bit ok_t, ok_s;
    ok_t = 1;
    ok_s = 1;
    for (int i = 0; i < n; i++) begin
      cpu(tgt, OP_READ, base + ADDR_W'(i * LINE_BYTES), p, 1'b0);
      if (!(cpu_rsp_hit[tgt] && cpu_rsp_locked[tgt] && cpu_rsp_pid[tgt] == p &&
            cpu_rsp_data[tgt] == pattern(base + ADDR_W'(i * LINE_BYTES), p))) ok_t = 0;
      cpu(src, OP_READ, base + ADDR_W'(i * LINE_BYTES), p, 1'b0);
      if (cpu_rsp_locked[src]) ok_s = 0;
    end
    check(ok_t, {name, ": all lines locked in the target with PID and data"});
    check(ok_s, {name, ": source copies unlocked"});
  endtask

  task automatic reset_all();
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
  endtask

  function automatic region_t [NUM_RR-1:0] one_region(input logic [ADDR_W-1:0] base, input int n);
    region_t [NUM_RR-1:0] r;
    r = '0;
    r[0].start_a = base;
    r[0].end_a = base + ADDR_W'(n * LINE_BYTES);
    return r;
  endfunction

  // single migration with a direct start; layout: n consecutive lines
  task automatic single(input mig_mode_e m, input int src, input int tgt, input int n,
                        input int expect_c, input string name);
    logic [ADDR_W-1:0] base;
    logic [PID_W-1:0] p;
    base = 32'h0010_0000 + ADDR_W'(src * 32'h1000);
    p = PID_W'(16 + src);
    reset_all();
    fill(src, base, n, p);
    cpu(src, OP_INSTALL, 32'h0070_0000, p, 1'b0);        // unlocked line in region 1
    @(negedge clk);
    start[src] = 1; start_mode[src] = m; start_target[src] = CORE_W'(tgt); start_pid[src] = p;
    start_regions[src] = one_region(base, n);
    start_regions[src][1].start_a = 32'h0070_0000;
    start_regions[src][1].end_a = 32'h0070_0020;
    @(negedge clk);
    start[src] = 0;
    while (!src_done[src]) @(negedge clk);
    repeat (2) @(negedge clk);
    check(int'(mig_cycles[src]) == expect_c,
          $sformatf("%s: delay %0d expected %0d", name, mig_cycles[src], expect_c));
    check(int'(lines_pushed[src]) == n && int'(lines_installed[tgt]) == n,
          $sformatf("%s: %0d pushed, %0d installed", name, lines_pushed[src], lines_installed[tgt]));
    check(stall_cycles == 0 && port_waits[src] == 0 && port_waits[tgt] == 0, {name, ": no conflicts"});
    verify_target(src, tgt, base, n, p, name);
    n_mode[m]++;
    n_skip  += int'(skipped_reads[src]);
    n_fake  += int'(fake_reads[src]);
    n_added += int'(added_delays[src]);
    if (m == MODE_SSCM && n > int'(S)) n_multi++;
    $display("%-22s %0d->%0d Cn=%0d delay=%0d", name, src, tgt, n, mig_cycles[src]);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) begin
      cpu_req_valid[c] = 0; cpu_req_op[c] = OP_READ; cpu_req_addr[c] = '0; cpu_req_pid[c] = '0;
      cpu_req_lock[c] = 0; cpu_req_data[c] = '0; start[c] = 0; start_mode[c] = MODE_RCM;
      start_target[c] = '0; start_pid[c] = '0; start_regions[c] = '0; ctx_we[c] = 0; ctx_in[c] = '0;
    end
    foreach (n_mode[i]) n_mode[i] = 0;
    repeat (2) @(posedge clk);

    // ---- phase 1: every scheme, one migration at a time (fft = 47 lines)
    // RCM reads the extra unlocked address too: one more D. In CCMP and SCMP that
    // read overlaps the transfer of the last line, so it costs nothing there.
    single(MODE_RCM,          0, 1, 47, 47 * 2 * (B + D) + D, "RCM");
    single(MODE_CCMP,         1, 2, 36, 18 * 2 * (B + D) + D, "CCMP");
    single(MODE_SCMP,         2, 3, 47, 47 * D + 2 * B + D, "SCMP");
    single(MODE_SSCM,         3, 0, 47, S * D + 47 * (2 * B + D), "SSCM");
    single(MODE_SLOTTED,      0, 2, 10, S * 2 * (B + D), "Slotted-SSCM");
    single(MODE_SLOTTED_PIPE, 1, 3, 47, 47 * D + 2 * B + D, "Slotted-SSCM pipe");

    // ---- phase 2: synchronised parallel chains
    begin
      logic [ADDR_W-1:0] base [3];
      int src [3], tgt [3], n [3];
      mig_mode_e m [3];
      int exp_c [3];
      src = '{1, 3, 0}; tgt = '{2, 1, 3}; n = '{47, 36, 41};
      m = '{MODE_RCM, MODE_RCM, MODE_SLOTTED};
      reset_all();
      for (int k = 0; k < 3; k++) begin
        base[k] = 32'h0020_0000 + ADDR_W'(k * 32'h4000);
        fill(src[k], base[k], n[k], PID_W'(32 + k));
      end
      // Slotted chain: 41 consecutive lines touch every set, so 41 slots
      exp_c = '{47 * 2 * (B + D), 36 * 2 * (B + D), 41 * 2 * (B + D)};
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        ctx_we[tgt[k]] = 1;
        ctx_in[tgt[k]] = '0;
        ctx_in[tgt[k]].valid = 1;
        ctx_in[tgt[k]].src = CORE_W'(src[k]);
        ctx_in[tgt[k]].offset = OFFS_W'(k * B);
        ctx_in[tgt[k]].mode = m[k];
        ctx_in[tgt[k]].pid = PID_W'(32 + k);
        ctx_in[tgt[k]].regions = one_region(base[k], n[k]);
        @(negedge clk);
        ctx_we[tgt[k]] = 0;
      end
      @(negedge clk);
      arm = 1;
      @(negedge clk);
      arm = 0;
      repeat (5) @(negedge clk);
      while (src_busy[0] || src_busy[1] || src_busy[3]) @(negedge clk);
      repeat (2 * (B + D)) @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        check(int'(mig_cycles[src[k]]) == exp_c[k],
              $sformatf("parallel chain %0d->%0d: delay %0d expected %0d", src[k], tgt[k],
                        mig_cycles[src[k]], exp_c[k]));
        check(int'(lines_installed[tgt[k]]) == n[k] && tgt_started[tgt[k]], "parallel chain lines");
        check(int'(init_cycle[tgt[k]]) == int'(t_first[tgt[k]]) + k * int'(B),
              $sformatf("chain %0d INIT at offset %0d", k, int'(init_cycle[tgt[k]]) - int'(t_first[tgt[k]])));
        verify_target(src[k], tgt[k], base[k], n[k], PID_W'(32 + k), "parallel chain");
      end
      check(stall_cycles == 0, $sformatf("parallel chains: %0d bus stall cycles", stall_cycles));
      check(port_waits[1] == 0 && port_waits[3] == 0, "source-and-target cores: no port waits");
      $display("parallel: delays %0d %0d %0d, bus messages %0d, stalls %0d",
               mig_cycles[1], mig_cycles[3], mig_cycles[0], msg_count, stall_cycles);
      n_parallel++;
      n_src_and_tgt += 2;
      n_init += 3;
      n_mode[MODE_RCM] += 2;
      n_mode[MODE_SLOTTED]++;
    end

    // ---- phase 3: unsynchronised streams meet on the bus
    begin
      reset_all();
      fill(0, 32'h0030_0000, 12, 8'd50);
      fill(2, 32'h0031_0000, 12, 8'd51);
      @(negedge clk);
      start[0] = 1; start_mode[0] = MODE_SCMP; start_target[0] = 2'd1; start_pid[0] = 8'd50;
      start_regions[0] = one_region(32'h0030_0000, 12);
      start[2] = 1; start_mode[2] = MODE_SCMP; start_target[2] = 2'd3; start_pid[2] = 8'd51;
      start_regions[2] = one_region(32'h0031_0000, 12);
      @(negedge clk);
      start[0] = 0; start[2] = 0;
      while (!(src_done[0] || !src_busy[0]) || src_busy[2]) @(negedge clk);
      repeat (3) @(negedge clk);
      check(stall_cycles != 0, "simultaneous streams contend on the bus");
      check(lines_installed[1] == 12 && lines_installed[3] == 12, "contended streams deliver all lines");
      check(int'(mig_cycles[0]) > 12 * int'(D) + 2 * int'(B) + int'(D) ||
            int'(mig_cycles[2]) > 12 * int'(D) + 2 * int'(B) + int'(D), "contention costs time");
      verify_target(0, 1, 32'h0030_0000, 12, 8'd50, "contended stream A");
      verify_target(2, 3, 32'h0031_0000, 12, 8'd51, "contended stream B");
      n_stall += int'(stall_cycles);
      n_mode[MODE_SCMP] += 2;
    end

    // ---- mechanisms exercised
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("scheme %0d exercised", i));
    check(n_parallel > 0, "parallel synchronised migration exercised");
    check(n_src_and_tgt > 0, "core as source and target at once exercised");
    check(n_init > 0, "INIT region transfer exercised");
    check(n_skip > 0, "unlocked address skipped");
    check(n_fake > 0, "fake set reads exercised");
    check(n_added > 0, "empty-set added delay exercised");
    check(n_multi > 0, "set buffer with several lines exercised");
    check(n_stall > 0, "bus contention exercised");
    check(n_tdma_mig > 0 && max_n_mig == 3, $sformatf("TDMA migration slots %0d, up to %0d chains", n_tdma_mig, max_n_mig));
    $display("mechanisms: RCM %0d CCMP %0d SCMP %0d SSCM %0d Slotted %0d SlottedPipe %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5]);
    $display("mechanisms: parallel %0d src+tgt %0d init %0d skipped %0d fake %0d added %0d multi %0d stall %0d",
             n_parallel, n_src_and_tgt, n_init, n_skip, n_fake, n_added, n_multi, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
