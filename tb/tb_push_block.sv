// tb_push_block: self-checking test of the source-side migration engine.
//
// A real l2_cache is the source cache; the bus and the target are modelled here:
// every push is granted at once and acknowledged 2B+D cycles after its grant (B on
// the bus, D for the target write, B for the acknowledgment). For each scheme the
// test locks a task's lines in the cache (plus decoy lines of another task and
// unlocked lines), runs one migration and checks the measured delay against the
// closed-form delay of the scheme, worked out here from the line layout, the count
// and the addresses/data of the pushed lines, and that the source copies lose their
// lock. Layouts reproduce the evaluated benchmark sizes (47, 36, 10 and 41 lines).
// The evaluated worst cases of the slotted schemes are run with the lines packed
// into the fewest sets, and crc once more with one set left empty (42 slots).
// The INIT start-up path is checked for its 2B+D set-up time.
module tb_push_block;
  import mig_pkg::*;

  localparam int unsigned SETS = L2_SETS;
  localparam int unsigned WAYS = L2_WAYS;
  localparam int unsigned D    = D_CYC;
  localparam int unsigned B    = B_CYC;
  localparam int unsigned AL   = 2 * B + D;   // push grant to ack delivery + 1

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // push block
  logic start = 0;
  mig_mode_e start_mode = MODE_RCM;
  logic [CORE_W-1:0] start_target = 1;
  logic [PID_W-1:0] start_pid = 0;
  region_t [NUM_RR-1:0] start_regions = '0;
  logic init_valid = 0;
  bus_msg_t init_msg = '0;
  logic ack_valid;
  logic pb_req_valid, pb_req_ready;
  cache_op_e pb_op;
  logic [ADDR_W-1:0] pb_addr;
  logic [PID_W-1:0] pb_pid;
  logic tx_valid, tx_grant;
  bus_msg_t tx_msg;
  logic busy, done;
  logic [CNT_W-1:0] mig_cycles, lines_pushed, line_reads, set_reads, fake_reads, added_delays, skipped_reads;

  // cache and its port mux
  logic tb_sel = 0;
  logic tb_valid = 0;
  cache_op_e tb_op = OP_READ;
  logic [ADDR_W-1:0] tb_addr = '0;
  logic [PID_W-1:0] tb_pid = '0;
  logic tb_lock = 0;
  logic [LINE_W-1:0] tb_data = '0;
  logic c_valid, c_ready, r_valid, r_ok;
  logic [WAYS-1:0] r_match, r_locked;
  logic [ADDR_W-1:0] r_addr [WAYS];
  logic [PID_W-1:0] r_pid [WAYS];
  logic [LINE_W-1:0] r_data [WAYS];

  assign c_valid      = tb_sel ? tb_valid : pb_req_valid;
  assign pb_req_ready = c_ready && !tb_sel;

  l2_cache #(.SETS(SETS), .WAYS(WAYS), .D(D)) u_l2 (
    .clk, .rst_n, .req_valid(c_valid), .req_ready(c_ready),
    .req_op(tb_sel ? tb_op : pb_op), .req_addr(tb_sel ? tb_addr : pb_addr),
    .req_pid(tb_sel ? tb_pid : pb_pid), .req_lock(tb_lock), .req_data(tb_data),
    .rsp_valid(r_valid), .rsp_ok(r_ok), .rsp_match(r_match), .rsp_locked(r_locked),
    .rsp_addr(r_addr), .rsp_pid(r_pid), .rsp_data(r_data)
  );

  push_block #(.CORE_ID(0), .SETS(SETS), .WAYS(WAYS), .D(D), .B(B)) dut (
    .clk, .rst_n, .start, .start_mode, .start_target, .start_pid, .start_regions,
    .init_valid, .init_msg, .ack_valid,
    .c_req_valid(pb_req_valid), .c_req_ready(pb_req_ready), .c_req_op(pb_op),
    .c_req_addr(pb_addr), .c_req_pid(pb_pid),
    .c_rsp_valid(r_valid && !tb_sel), .c_rsp_match(r_match), .c_rsp_addr(r_addr),
    .c_rsp_data(r_data),
    .tx_valid, .tx_msg, .tx_grant, .busy, .done, .mig_cycles, .lines_pushed,
    .line_reads, .set_reads, .fake_reads, .added_delays, .skipped_reads
  );

  // bus + target model
  assign tx_grant = tx_valid;
  logic [AL-1:0] ack_sr = '0;
  assign ack_valid = ack_sr[AL-2];
  int last_grant = -100;
  int bus_overlaps = 0;
  int n_pushed = 0;
  int init_ack_cycle = -1;
  int first_read_cycle = -1;
  logic [ADDR_W-1:0] pushed_addr [$];
  logic [LINE_W-1:0] pushed_data [$];
  always @(posedge clk) begin
    ack_sr <= {ack_sr[AL-2:0], tx_valid && tx_msg.mtype == MSG_PUSH};
    if (tx_valid) begin
      if (cycle - last_grant < int'(B)) bus_overlaps++;
      last_grant = cycle;
      if (tx_msg.mtype == MSG_PUSH) begin
        pushed_addr.push_back(tx_msg.addr);
        pushed_data.push_back(tx_msg.data);
        if (tx_msg.dst != start_target) failures++;
      end else if (tx_msg.mtype == MSG_INIT_ACK) init_ack_cycle = cycle;
    end
    if (pb_req_valid && pb_req_ready && first_read_cycle < 0) first_read_cycle = cycle;
  end

  function automatic logic [LINE_W-1:0] pattern(input logic [ADDR_W-1:0] a);
    return {8{a ^ 32'hA5A5_0000}};
  endfunction

  task automatic cache_op(input cache_op_e op, input logic [ADDR_W-1:0] a,
                          input logic [PID_W-1:0] pid, input logic lock);
    @(negedge clk);
    tb_sel = 1; tb_valid = 1; tb_op = op; tb_addr = a; tb_pid = pid; tb_lock = lock;
    tb_data = pattern(a);
    do @(posedge clk); while (!c_ready);
    @(negedge clk);
    tb_valid = 0;
    while (!r_valid) @(negedge clk);
    @(negedge clk);
    tb_sel = 0;
  endtask

  // Locked line count per set for the lines of PID `pid` written by fill().
  int per_set [SETS];

  task automatic clear_cache();
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (per_set[s]) per_set[s] = 0;
  endtask

  // n lines of task `pid` at consecutive line addresses from `base`, locked;
  // one decoy line of another task and one unlocked line of this task.
  task automatic fill(input logic [ADDR_W-1:0] base, input int n, input logic [PID_W-1:0] pid);
    for (int i = 0; i < n; i++) begin
      cache_op(OP_INSTALL, base + ADDR_W'(i * LINE_BYTES), pid, 1'b1);
      per_set[((base >> OFF_W) + i) % SETS]++;
    end
    cache_op(OP_INSTALL, 32'h0080_0000, pid + 8'd1, 1'b1);   // other task, set 0
    cache_op(OP_INSTALL, 32'h0090_0020, pid, 1'b0);          // unlocked, set 1
  endtask

  function automatic int expected(input mig_mode_e m, input int cn, input int skipped);
    int empty, slots, last;
    empty = 0;
    slots = 0;
    last  = -1;
    for (int s = 0; s < SETS; s++) begin
      if (per_set[s] == 0) begin
        empty++;
        slots++;
      end else begin
        slots += per_set[s];
        last = slots - 1;
      end
    end
    case (m)
      MODE_RCM:  return cn * 2 * (B + D) + skipped * D;
      MODE_CCMP: return (cn % 2 == 1) ? ((cn + 1) / 2) * 2 * (B + D)
                                      : (cn / 2) * 2 * (B + D) + D;
      MODE_SCMP: return cn * D + 2 * B + D;
      MODE_SSCM: return SETS * D + cn * (2 * B + D);
      MODE_SLOTTED: return (empty + cn) * 2 * (B + D);
      default: begin
        int a, b;
        a = slots * D;
        b = (last + 1) * D + 2 * B + D;
        return (a > b) ? a : b;
      end
    endcase
  endfunction

  task automatic run(input mig_mode_e m, input logic [ADDR_W-1:0] base, input int cn,
                     input int extra_unlocked, input int paper_value, input string name);
    logic [PID_W-1:0] pid;
    int exp_c, t0;
    bit all_ok;
    pid = 8'd7;
    clear_cache();
    fill(base, cn, pid);
    pushed_addr.delete();
    pushed_data.delete();
    bus_overlaps = 0;
    @(negedge clk);
    start = 1; start_mode = m; start_pid = pid; start_target = 2'd1;
    start_regions = '0;
    start_regions[0].start_a = base;
    start_regions[0].end_a   = base + ADDR_W'(cn * LINE_BYTES);
    if (extra_unlocked > 0) begin  // a second region holding only the unlocked line
      start_regions[2].start_a = 32'h0090_0020;
      start_regions[2].end_a   = 32'h0090_0040;
    end
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      if (cycle - t0 > 20000) break;
    end
    exp_c = expected(m, cn, extra_unlocked);
    check(done, {name, ": finished"});
    check(int'(mig_cycles) == exp_c,
          $sformatf("%s: delay %0d expected %0d", name, mig_cycles, exp_c));
    if (paper_value > 0)
      check(int'(mig_cycles) == paper_value,
            $sformatf("%s: delay %0d vs evaluated %0d", name, mig_cycles, paper_value));
    check(int'(lines_pushed) == cn && pushed_addr.size() == cn,
          $sformatf("%s: pushed %0d lines, expected %0d", name, lines_pushed, cn));
    all_ok = 1;
    foreach (pushed_addr[i]) begin
      if (pushed_addr[i] < base || pushed_addr[i] >= base + ADDR_W'(cn * LINE_BYTES) ||
          pushed_data[i] != pattern(pushed_addr[i])) all_ok = 0;
      for (int j = 0; j < i; j++) if (pushed_addr[j] == pushed_addr[i]) all_ok = 0;
    end
    check(all_ok, {name, ": pushed addresses and data"});
    check(bus_overlaps == 0, {name, ": pushes B cycles apart"});
    check(int'(skipped_reads) == ((m == MODE_RCM || m == MODE_CCMP || m == MODE_SCMP)
                                  ? extra_unlocked : skipped_reads),
          {name, ": skipped reads"});
    // source copy unlocked, decoy of the other task still locked
    cache_op(OP_READ, base, pid, 1'b0);
    check(r_ok && r_locked == '0 || (r_locked & r_match) == '0, {name, ": source line unlocked"});
    cache_op(OP_READ, 32'h0080_0000, pid, 1'b0);
    check((r_locked & r_match) != '0, {name, ": other task's line stays locked"});
    $display("%-28s Cn=%0d delay=%0d (expected %0d)", name, cn, mig_cycles, exp_c);
  endtask


  // Worst-case layout of the slotted schemes: the task's cn lines packed into the
  // fewest sets, and those sets placed last, so every set before them is empty and
  // the last slot holds a line. Line i goes to set SETS-1-i/WAYS with tag i%WAYS.
  // Layout 1 (crc): 41 lines over sets 1..31, set 0 left empty; the first 31 lines
  // take one set each, the last ten share sets 1..10 with them.
  int layout = 0;
  function automatic int wc_set(input int i);
    if (layout == 1) return (i < 31) ? 1 + i : 1 + (i - 31);
    return SETS - 1 - i / WAYS;
  endfunction
  function automatic logic [ADDR_W-1:0] wc_addr(input int i);
    int tag;
    tag = (layout == 1) ? ((i < 31) ? 0 : 1) : i % WAYS;
    return 32'h0004_0000 + ADDR_W'((tag * SETS + wc_set(i)) * LINE_BYTES);
  endfunction

  task automatic run_wc(input mig_mode_e m, input int cn, input int paper_value, input string name);
    int exp_c;
    bit all_ok;
    clear_cache();
    for (int i = 0; i < cn; i++) begin
      cache_op(OP_INSTALL, wc_addr(i), 8'd11, 1'b1);
      per_set[wc_set(i)]++;
    end
    pushed_addr.delete();
    pushed_data.delete();
    @(negedge clk);
    start = 1; start_mode = m; start_pid = 8'd11; start_target = 2'd1; start_regions = '0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    exp_c = expected(m, cn, 0);
    check(int'(mig_cycles) == exp_c,
          $sformatf("%s: delay %0d expected %0d", name, mig_cycles, exp_c));
    if (paper_value > 0)
      check(int'(mig_cycles) == paper_value,
            $sformatf("%s: delay %0d vs evaluated worst case %0d", name, mig_cycles, paper_value));
    all_ok = (pushed_addr.size() == cn);
    foreach (pushed_addr[k]) begin
      bit found = 0;
      for (int i = 0; i < cn; i++) if (pushed_addr[k] == wc_addr(i)) found = 1;
      if (!found || pushed_data[k] != pattern(pushed_addr[k])) all_ok = 0;
    end
    check(all_ok, {name, ": pushed lines"});
    $display("%-28s Cn=%0d delay=%0d (expected %0d)", name, cn, mig_cycles, exp_c);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // evaluated task sizes (lines locked at consecutive addresses)
    run(MODE_RCM,  32'h0001_0000, 47, 0, 1128, "RCM fft");
    run(MODE_RCM,  32'h0001_0000, 36, 0,  864, "RCM jfdctint");
    run(MODE_RCM,  32'h0001_0000, 10, 0,  240, "RCM bs");
    run(MODE_RCM,  32'h0001_0000, 10, 1,    0, "RCM with unlocked line");
    run(MODE_CCMP, 32'h0001_0000, 47, 0,  576, "CCMP fft");
    run(MODE_CCMP, 32'h0001_0000, 36, 0,  442, "CCMP jfdctint");
    run(MODE_CCMP, 32'h0001_0000, 10, 0,  130, "CCMP bs");
    run(MODE_SCMP, 32'h0001_0000, 47, 0,  484, "SCMP fft");
    run(MODE_SCMP, 32'h0001_0000, 36, 0,  374, "SCMP jfdctint");
    run(MODE_SCMP, 32'h0001_0000, 10, 0,  114, "SCMP bs");
    run(MODE_SSCM, 32'h0001_0000, 47, 0,  978, "SSCM fft");
    run(MODE_SSCM, 32'h0001_0000, 36, 0,  824, "SSCM jfdctint");
    run(MODE_SSCM, 32'h0001_0000, 10, 0,  460, "SSCM bs");
    run(MODE_SSCM, 32'h0001_0000, 41, 0,  894, "SSCM crc");
    run(MODE_SLOTTED, 32'h0001_0000, 47, 0, 1128, "Slotted-SSCM fft");
    run(MODE_SLOTTED, 32'h0001_0000, 36, 0,  864, "Slotted-SSCM jfdctint");
    run(MODE_SLOTTED, 32'h0001_0000, 10, 0,  768, "Slotted-SSCM bs");
    run(MODE_SLOTTED_PIPE, 32'h0001_0000, 47, 0, 484, "Slotted-SSCM pipe fft");
    run(MODE_SLOTTED_PIPE, 32'h0001_0000, 36, 0, 374, "Slotted-SSCM pipe jfdctint");
    run(MODE_SLOTTED_PIPE, 32'h0001_0000, 10, 0, 320, "Slotted-SSCM pipe bs");
    run(MODE_SLOTTED_PIPE, 32'h0001_0200, 20, 0,   0, "Slotted-SSCM pipe offset");
    // evaluated worst cases of the slotted schemes (lines packed in the fewest sets).
    // For bs (10 lines in 2 sets) the slotted worst case is (30 + 10) slots = 960
    // cycles; the pipelined one, 414, agrees with the evaluated value.
    run_wc(MODE_SLOTTED,      47, 1752, "Slotted-SSCM WC fft");
    run_wc(MODE_SLOTTED,      36, 1512, "Slotted-SSCM WC jfdctint");
    run_wc(MODE_SLOTTED,      10,    0, "Slotted-SSCM WC bs");
    run_wc(MODE_SLOTTED,      41, 1608, "Slotted-SSCM WC crc");
    run_wc(MODE_SLOTTED_PIPE, 47,  744, "Slotted-SSCM pipe WC fft");
    run_wc(MODE_SLOTTED_PIPE, 36,  644, "Slotted-SSCM pipe WC jfdctint");
    run_wc(MODE_SLOTTED_PIPE, 10,  414, "Slotted-SSCM pipe WC bs");
    run_wc(MODE_SLOTTED_PIPE, 41,  684, "Slotted-SSCM pipe WC crc");
    // crc: 41 lines in 31 sets (one set empty) gives the evaluated 42 slots
    layout = 1;
    run_wc(MODE_SLOTTED,      41, 1008, "Slotted-SSCM crc 31 sets");
    run_wc(MODE_SLOTTED_PIPE, 41,  434, "Slotted-SSCM pipe crc 31 sets");
    layout = 0;
    // worst case of the slotted schemes: 16 lines packed in 2 sets (stride = SETS lines)
    begin
      int exp_wc;
      clear_cache();
      for (int i = 0; i < 16; i++) begin
        cache_op(OP_INSTALL, 32'h0002_0000 + ADDR_W'((i % 8) * SETS * LINE_BYTES + (i / 8) * LINE_BYTES), 8'd9, 1'b1);
      end
      @(negedge clk);
      start = 1; start_mode = MODE_SLOTTED; start_pid = 8'd9; start_regions = '0;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      exp_wc = (SETS - 2 + 16) * 2 * (B + D);
      check(int'(mig_cycles) == exp_wc, $sformatf("slotted worst case %0d expected %0d", mig_cycles, exp_wc));
      check(int'(fake_reads) == 14 && int'(added_delays) == SETS - 2, "slotted fake reads / added delays");
      $display("Slotted-SSCM worst case      Cn=16 delay=%0d (expected %0d)", mig_cycles, exp_wc);
    end
    // INIT start-up: set-up costs 2B+D before the first read
    begin
      int t_init;
      clear_cache();
      fill(32'h0001_0000, 4, 8'd3);
      pushed_addr.delete();
      first_read_cycle = -1;
      @(negedge clk);
      init_valid = 1;
      init_msg = '0;
      init_msg.mtype = MSG_INIT; init_msg.src = 2'd1; init_msg.dst = 2'd0;
      init_msg.mode = MODE_RCM; init_msg.pid = 8'd3;
      init_msg.data[2*ADDR_W*NUM_RR-1 -: 2*ADDR_W] = {32'h0001_0000, 32'h0001_0080};
      t_init = cycle;
      @(negedge clk);
      init_valid = 0;
      while (!done) @(negedge clk);
      check(init_ack_cycle == t_init + int'(D) + 1, $sformatf("INIT_ACK at +%0d", init_ack_cycle - t_init));
      check(first_read_cycle == t_init + int'(D + B) + 1,
            $sformatf("first read at +%0d", first_read_cycle - t_init));
      check(int'(lines_pushed) == 4 && int'(mig_cycles) == 4 * 2 * int'(B + D), "INIT-started RCM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
