// tb_snoop_ctrl: self-checking test of the target-side snoop controller.
//
// The cache is a model here that answers D cycles after accepting. Checks: a push
// addressed to this core is installed (locked, with its PID and data) starting the
// cycle after delivery and acknowledged to its sender right after the D-cycle
// write; pushes for other cores are ignored; INIT and ACK deliveries are passed to
// the push block; INIT_ACK sets tgt_started; an offset-0 target sends its INIT as
// soon as it is armed, and an offset-k target sends it exactly k cycles after the
// first bus message, carrying the packed Region Registers.
module tb_snoop_ctrl;
  import mig_pkg::*;

  localparam int unsigned D = D_CYC;
  localparam int unsigned ME = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ctx_we = 0, arm = 0, msg_start = 0, dlv_valid = 0;
  target_ctx_t ctx_in = '0;
  bus_msg_t dlv_msg = '0;
  logic init_valid, ack_valid;
  bus_msg_t init_msg;
  logic c_req_valid, c_req_ready, c_rsp_valid, c_rsp_ok;
  logic [ADDR_W-1:0] c_req_addr;
  logic [PID_W-1:0] c_req_pid;
  logic [LINE_W-1:0] c_req_data;
  logic tx_valid, tx_grant;
  bus_msg_t tx_msg;
  logic tgt_started;
  logic [CNT_W-1:0] lines_installed, install_fail, t_first, init_cycle;

  snoop_ctrl #(.CORE_ID(ME)) dut (.*);

  // cache model
  int ccnt = 0;
  int acc_cycle = -1;
  logic [ADDR_W-1:0] acc_addr;
  logic [PID_W-1:0] acc_pid;
  logic [LINE_W-1:0] acc_data;
  assign c_req_ready = (ccnt == 0);
  assign c_rsp_valid = (ccnt == 1);
  assign c_rsp_ok = 1'b1;
  always @(posedge clk) begin
    if (c_req_valid && c_req_ready) begin
      ccnt <= D - 1;
      acc_cycle = cycle; acc_addr = c_req_addr; acc_pid = c_req_pid; acc_data = c_req_data;
    end else if (ccnt != 0) ccnt <= ccnt - 1;
  end

  // bus model: grants at once, records transmissions
  assign tx_grant = tx_valid;
  int tx_cycle = -1;
  bus_msg_t tx_last;
  int n_tx = 0;
  always @(posedge clk) if (rst_n && tx_valid) begin
    tx_cycle = cycle; tx_last = tx_msg; n_tx++;
  end

  task automatic deliver(input msg_type_e t, input int src, input int dst, input logic [ADDR_W-1:0] a);
    @(negedge clk);
    dlv_valid = 1;
    dlv_msg = '0;
    dlv_msg.mtype = t; dlv_msg.src = CORE_W'(src); dlv_msg.dst = CORE_W'(dst);
    dlv_msg.addr = a; dlv_msg.pid = 8'h42; dlv_msg.data = {8{a}};
    #1;
  endtask

  int t0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // push for another core: ignored
    deliver(MSG_PUSH, 0, 1, 32'h100);
    @(negedge clk); dlv_valid = 0;
    repeat (3) @(negedge clk);
    check(acc_cycle < 0 && !c_req_valid, "push for another core ignored");
    // push for this core
    deliver(MSG_PUSH, 3, ME, 32'h1240);
    t0 = cycle;
    @(negedge clk); dlv_valid = 0;
    repeat (D + 4) @(negedge clk);
    check(acc_cycle == t0 + 1, $sformatf("install starts %0d cycles after delivery", acc_cycle - t0));
    check(acc_addr == 32'h1240 && acc_pid == 8'h42 && acc_data == {8{32'h1240}}, "install content");
    check(tx_cycle == t0 + int'(D) + 1 && tx_last.mtype == MSG_ACK &&
          tx_last.dst == 2'd3 && tx_last.src == CORE_W'(ME), "acknowledgment to the sender after D");
    check(lines_installed == 1, "line counted");
    // two pushes back to back (SCMP rate: D apart) and one closer (buffered)
    deliver(MSG_PUSH, 1, ME, 32'h2000);
    @(negedge clk); dlv_valid = 0;
    deliver(MSG_PUSH, 0, ME, 32'h2020);
    @(negedge clk); dlv_valid = 0;
    repeat (3 * D) @(negedge clk);
    check(lines_installed == 3 && n_tx == 3 && tx_last.dst == 2'd0, "buffered pushes installed and acknowledged");
    // INIT / ACK forwarding
    deliver(MSG_INIT, 1, ME, 32'h0);
    check(init_valid && !ack_valid, "INIT forwarded");
    @(negedge clk); dlv_valid = 0;
    deliver(MSG_ACK, 1, ME, 32'h0);
    check(ack_valid && !init_valid, "ACK forwarded");
    @(negedge clk); dlv_valid = 0;
    deliver(MSG_ACK, 1, 0, 32'h0);
    check(!ack_valid, "ACK for another core not forwarded");
    @(negedge clk); dlv_valid = 0;
    // offset-0 target
    ctx_in = '0;
    ctx_in.valid = 1; ctx_in.src = 2'd1; ctx_in.offset = '0; ctx_in.mode = MODE_RCM; ctx_in.pid = 8'h11;
    ctx_in.regions[0] = '{start_a: 32'h4000, end_a: 32'h4100};
    ctx_we = 1;
    @(negedge clk); ctx_we = 0;
    arm = 1;
    t0 = cycle;
    @(negedge clk); arm = 0;
    repeat (2) @(negedge clk);
    check(tx_cycle == t0 + 1 && tx_last.mtype == MSG_INIT && tx_last.dst == 2'd1 &&
          tx_last.pid == 8'h11 && tx_last.data == LINE_W'(ctx_in.regions), "offset-0 INIT at once");
    deliver(MSG_INIT_ACK, 1, ME, 32'h0);
    @(negedge clk); dlv_valid = 0;
    check(tgt_started, "INIT_ACK marks target started");
    // offset-6 target: counts from the first bus message
    ctx_in.offset = 16'd6; ctx_in.src = 2'd0;
    ctx_we = 1;
    @(negedge clk); ctx_we = 0;
    arm = 1;
    @(negedge clk); arm = 0;
    repeat (3) @(negedge clk);
    check(tx_last.dst != 2'd0 || tx_last.mtype != MSG_INIT, "no INIT before the first message");
    msg_start = 1;
    t0 = cycle;
    @(negedge clk); msg_start = 0;
    repeat (3) @(negedge clk);
    msg_start = 1;                     // later messages do not move the reference
    @(negedge clk); msg_start = 0;
    repeat (6) @(negedge clk);
    check(tx_cycle == t0 + 6 && tx_last.mtype == MSG_INIT && tx_last.dst == 2'd0,
          $sformatf("offset-6 INIT %0d cycles after first message", tx_cycle - t0));
    check(!tgt_started, "target not started before its INIT_ACK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
