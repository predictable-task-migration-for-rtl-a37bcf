// tb_core_node: self-checking test of one core's migration node (L2, push block and
// snoop controller behind one cache port).
//
// The bus and the other cores are modelled here: requests are granted at once, and
// each push the node sends is acknowledged back 2B+D cycles after its grant. Checks:
// a streamed migration out of the node takes Cn*D + 2B + D; while the node streams,
// push requests from another core arrive and are installed first (the node's own
// reads wait, which is counted) and acknowledged, and the migration still completes;
// the installed lines are locked with their PID; arming with an offset-0 target
// context sends the INIT with the packed regions; an INIT delivered to the node
// starts an RCM chain after INIT_ACK.
module tb_core_node;
  import mig_pkg::*;

  localparam int unsigned D = D_CYC;
  localparam int unsigned B = B_CYC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_lock = 0;
  cache_op_e cpu_req_op = OP_READ;
  logic [ADDR_W-1:0] cpu_req_addr = '0;
  logic [PID_W-1:0] cpu_req_pid = '0;
  logic [LINE_W-1:0] cpu_req_data = '0;
  logic cpu_rsp_valid, cpu_rsp_hit, cpu_rsp_locked;
  logic [PID_W-1:0] cpu_rsp_pid;
  logic [LINE_W-1:0] cpu_rsp_data;
  logic start = 0;
  mig_mode_e start_mode = MODE_SCMP;
  logic [CORE_W-1:0] start_target = 2'd3;
  logic [PID_W-1:0] start_pid = 8'd5;
  region_t [NUM_RR-1:0] start_regions = '0;
  logic ctx_we = 0, arm = 0;
  target_ctx_t ctx_in = '0;
  logic msg_start, dlv_valid;
  bus_msg_t dlv_msg;
  logic [1:0] bus_req, bus_gnt;
  bus_msg_t bus_msg [2];
  logic src_busy, src_done, tgt_started;
  logic [CNT_W-1:0] mig_cycles, lines_pushed, line_reads, set_reads, fake_reads, added_delays,
                    skipped_reads, lines_installed, install_fail, t_first, init_cycle, port_waits;

  core_node #(.CORE_ID(0)) dut (.*);

  // bus model
  assign bus_gnt[0] = bus_req[0];
  assign bus_gnt[1] = bus_req[1] && !bus_req[0];
  assign msg_start = |bus_gnt;
  bus_msg_t sched [int];
  bus_msg_t sent [$];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) if (bus_gnt[i]) begin
      sent.push_back(bus_msg[i]);
      if (bus_msg[i].mtype == MSG_PUSH) begin
        bus_msg_t a;
        int t;
        a = '0; a.mtype = MSG_ACK; a.src = bus_msg[i].dst; a.dst = 2'd0;
        t = cycle + 2 * int'(B) + int'(D) - 1;
        while (sched.exists(t)) t++;
        sched[t] = a;
      end
    end
  end
  always_comb begin
    dlv_valid = sched.exists(cycle) && rst_n;
    dlv_msg = dlv_valid ? sched[cycle] : '0;
  end

  task automatic inject(input int at, input msg_type_e t, input int src, input logic [ADDR_W-1:0] a);
    bus_msg_t m;
    int c;
    m = '0; m.mtype = t; m.src = CORE_W'(src); m.dst = 2'd0; m.addr = a; m.pid = 8'd9;
    m.data = {8{a}};
    m.mode = MODE_RCM;
    if (t == MSG_INIT) m.data = LINE_W'({32'h0000_8000, 32'h0000_8060}) << (3 * 2 * ADDR_W);  // region 3
    c = at;
    while (sched.exists(c)) c++;
    sched[c] = m;
  endtask

  task automatic cpu(input cache_op_e op, input logic [ADDR_W-1:0] a, input logic [PID_W-1:0] p,
                     input logic lock);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_op = op; cpu_req_addr = a; cpu_req_pid = p; cpu_req_lock = lock;
    cpu_req_data = {8{a}};
    #1;
    while (!cpu_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cpu_req_valid = 0;
    while (!cpu_rsp_valid) @(negedge clk);
  endtask

  task automatic go(input mig_mode_e m, input int n);
    @(negedge clk);
    start = 1; start_mode = m;
    start_regions = '0;
    start_regions[0] = '{start_a: 32'h0000_1000, end_a: 32'h0000_1000 + ADDR_W'(n * LINE_BYTES)};
    @(negedge clk);
    start = 0;
  endtask

  int nack;
  bit ok;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) cpu(OP_INSTALL, 32'h0000_1000 + ADDR_W'(i * 32), 8'd5, 1'b1);
    // undisturbed streamed migration
    go(MODE_SCMP, 6);
    while (!src_done) @(negedge clk);
    check(int'(mig_cycles) == 6 * int'(D) + 2 * int'(B) + int'(D), $sformatf("SCMP delay %0d", mig_cycles));
    check(lines_pushed == 6 && port_waits == 0, "six lines pushed, no port waits");
    // relock and stream again while another core pushes three lines into this node
    for (int i = 0; i < 6; i++) cpu(OP_INSTALL, 32'h0000_1000 + ADDR_W'(i * 32), 8'd5, 1'b1);
    sent.delete();
    go(MODE_SCMP, 6);
    inject(cycle + 5, MSG_PUSH, 2, 32'h0000_4000);
    inject(cycle + 17, MSG_PUSH, 2, 32'h0000_4020);
    inject(cycle + 29, MSG_PUSH, 2, 32'h0000_4040);
    while (!src_done) @(negedge clk);
    repeat (3 * D) @(negedge clk);
    check(lines_pushed == 6, "stream completes under interference");
    check(port_waits != 0, "installs take the port first");
    check(int'(mig_cycles) > 6 * int'(D) + 2 * int'(B) + int'(D), "interference delays the stream");
    check(lines_installed == 3, "three incoming lines installed");
    nack = 0;
    foreach (sent[i]) if (sent[i].mtype == MSG_ACK && sent[i].dst == 2'd2) nack++;
    check(nack == 3, $sformatf("%0d acknowledgments to the sender", nack));
    ok = 1;
    for (int i = 0; i < 3; i++) begin
      cpu(OP_READ, 32'h0000_4000 + ADDR_W'(i * 32), 0, 0);
      if (!(cpu_rsp_hit && cpu_rsp_locked && cpu_rsp_pid == 8'd9 &&
            cpu_rsp_data == {8{32'h0000_4000 + 32'(i * 32)}})) ok = 0;
    end
    check(ok, "incoming lines locked with their PID");
    // arming as offset-0 target sends the INIT
    ctx_in = '0;
    ctx_in.valid = 1; ctx_in.src = 2'd1; ctx_in.mode = MODE_SLOTTED; ctx_in.pid = 8'd77;
    ctx_in.regions[1] = '{start_a: 32'h0000_9000, end_a: 32'h0000_9100};
    @(negedge clk); ctx_we = 1;
    @(negedge clk); ctx_we = 0; arm = 1; sent.delete();
    @(negedge clk); arm = 0;
    repeat (3) @(negedge clk);
    check(sent.size() == 1 && sent[0].mtype == MSG_INIT && sent[0].dst == 2'd1 &&
          sent[0].mode == MODE_SLOTTED && sent[0].data == LINE_W'(ctx_in.regions), "INIT sent on arm");
    // INIT delivered to the node: RCM chain over the 3-line region 0x8000..0x8060
    for (int i = 0; i < 3; i++) cpu(OP_INSTALL, 32'h0000_8000 + ADDR_W'(i * 32), 8'd9, 1'b1);
    sent.delete();
    inject(cycle + 2, MSG_INIT, 3, 32'h0);
    repeat (2) @(negedge clk);
    while (!src_done) @(negedge clk);
    check(sent.size() == 4 && sent[0].mtype == MSG_INIT_ACK && sent[0].dst == 2'd3, "INIT_ACK first");
    check(lines_pushed == 3 && int'(mig_cycles) == 3 * 2 * int'(B + D), "INIT-started RCM chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
