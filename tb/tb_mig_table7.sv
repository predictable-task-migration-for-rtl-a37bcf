// tb_mig_table7: the evaluated choice between parallel and serialised migration,
// run on the four-core system at its default size.
//
// Four hard real-time tasks lock 47 (task 1), 36 (task 2), 10 (task 3) and 41
// (task 4) L2 lines. For each evaluated set of migrating tasks that four cores can
// hold (tasks 1,2,4 / 2,4 / 1,3,4) the test runs the set twice:
//  * parallel: synchronised RCM chains on the pairs 1->2, 3->1, 0->3 with offsets
//    0, B, 2B. Each chain must take exactly Cn*2(B+D) after its 2B+D set-up, with
//    no bus stall and no cache-port wait, so the cost of the set is its largest
//    RCM delay;
//  * serialised: the same migrations one after another with SCMP, each taking
//    Cn*D + 2B + D, so the cost is the sum.
// The cheaper of the two is the scheduler's choice, which must agree with the
// evaluated choice (parallel, pipelined, pipelined). Every line must arrive locked
// with its PID and data. The set of all four tasks needs four distinct targets
// without a cycle, i.e. at least five cores, and is not run here.
module tb_mig_table7;
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


  task automatic write_ctx(input int s, input int t, input int off, input mig_mode_e m,
                           input logic [PID_W-1:0] p, input logic [ADDR_W-1:0] base, input int n);
    @(negedge clk);
    ctx_we[t] = 1;
    ctx_in[t] = '0;
    ctx_in[t].valid = 1;
    ctx_in[t].src = CORE_W'(s);
    ctx_in[t].offset = OFFS_W'(off);
    ctx_in[t].mode = m;
    ctx_in[t].pid = p;
    ctx_in[t].regions = one_region(base, n);
    @(negedge clk);
    ctx_we[t] = 0;
  endtask

  // task sizes, and the pairs the k-th migrating task of a set uses
  int lines [5] = '{0, 47, 36, 10, 41};
  int pair_src [3] = '{1, 3, 0};
  int pair_tgt [3] = '{2, 1, 3};
  int n_par_choice = 0, n_pipe_choice = 0;

  task automatic run_set(input int tasks [$], input bit evaluated_parallel, input string name);
    int par_cost, ser_cost, exp_ser, span, t_arm, worst;
    logic [ADDR_W-1:0] base [3];
    bit choose_parallel;
    // parallel RCM chains
    reset_all();
    foreach (tasks[k]) begin
      base[k] = 32'h0030_0000 + ADDR_W'(k * 32'h4000);
      fill(pair_src[k], base[k], lines[tasks[k]], PID_W'(40 + tasks[k]));
    end
    foreach (tasks[k])
      write_ctx(pair_src[k], pair_tgt[k], k * int'(B), MODE_RCM, PID_W'(40 + tasks[k]),
                base[k], lines[tasks[k]]);
    @(negedge clk);
    arm = 1;
    t_arm = cycle;
    @(negedge clk);
    arm = 0;
    repeat (5) @(negedge clk);
    while (src_busy[0] || src_busy[1] || src_busy[3]) @(negedge clk);
    span = cycle - t_arm;
    repeat (2 * (B + D)) @(negedge clk);
    par_cost = 0;
    worst = 0;
    foreach (tasks[k]) begin
      int e;
      e = lines[tasks[k]] * 2 * int'(B + D);
      check(int'(mig_cycles[pair_src[k]]) == e,
            $sformatf("%s parallel task %0d: delay %0d expected %0d", name, tasks[k],
                      mig_cycles[pair_src[k]], e));
      check(int'(lines_installed[pair_tgt[k]]) == lines[tasks[k]], {name, ": parallel lines installed"});
      verify_target(pair_src[k], pair_tgt[k], base[k], lines[tasks[k]], PID_W'(40 + tasks[k]),
                    {name, " parallel"});
      if (int'(mig_cycles[pair_src[k]]) > par_cost) par_cost = int'(mig_cycles[pair_src[k]]);
      if (k * int'(B) + e > worst) worst = k * int'(B) + e;
    end
    check(stall_cycles == 0, $sformatf("%s parallel: %0d bus stall cycles", name, stall_cycles));
    check(port_waits[0] == 0 && port_waits[1] == 0 && port_waits[3] == 0,
          {name, " parallel: no cache-port waits"});
    // whole phase: set-up of 2B+D plus the latest chain's offset and delay, plus the
    // cycles from arm to the first INIT on the bus and from the last ACK to idle
    check(span >= worst + int'(2 * B + D) && span <= worst + int'(2 * B + D) + 4,
          $sformatf("%s parallel phase %0d cycles for chains ending at %0d", name, span, worst));
    // serialised SCMP migrations
    reset_all();
    foreach (tasks[k]) begin
      base[k] = 32'h0030_0000 + ADDR_W'(k * 32'h4000);
      fill(pair_src[k], base[k], lines[tasks[k]], PID_W'(40 + tasks[k]));
    end
    ser_cost = 0;
    exp_ser = 0;
    foreach (tasks[k]) begin
      int s;
      s = pair_src[k];
      @(negedge clk);
      start[s] = 1; start_mode[s] = MODE_SCMP; start_target[s] = CORE_W'(pair_tgt[k]);
      start_pid[s] = PID_W'(40 + tasks[k]); start_regions[s] = one_region(base[k], lines[tasks[k]]);
      @(negedge clk);
      start[s] = 0;
      while (!src_done[s]) @(negedge clk);
      repeat (2) @(negedge clk);
      ser_cost += int'(mig_cycles[s]);
      exp_ser += lines[tasks[k]] * int'(D) + int'(2 * B + D);
    end
    repeat (2 * (B + D)) @(negedge clk);
    foreach (tasks[k])
      verify_target(pair_src[k], pair_tgt[k], base[k], lines[tasks[k]], PID_W'(40 + tasks[k]),
                    {name, " serialised"});
    check(ser_cost == exp_ser, $sformatf("%s serialised SCMP %0d expected %0d", name, ser_cost, exp_ser));
    choose_parallel = par_cost < ser_cost;
    check(choose_parallel == evaluated_parallel, {name, ": scheduler choice"});
    if (choose_parallel) n_par_choice++; else n_pipe_choice++;
    $display("tasks %-6s parallel %5d (phase %5d)  serialised SCMP %5d  -> %s", name, par_cost, span,
             ser_cost, choose_parallel ? "Parallel" : "Pipeline");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    run_set('{1, 2, 4}, 1'b1, "1,2,4");
    run_set('{2, 4},    1'b0, "2,4");
    run_set('{1, 3, 4}, 1'b0, "1,3,4");
    check(n_par_choice > 0 && n_pipe_choice > 0, "both choices made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
