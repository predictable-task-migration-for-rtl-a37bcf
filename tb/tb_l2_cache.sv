// tb_l2_cache: self-checking test of the lockable, PID-tagged L2.
//
// Checks the D-cycle access timing (response in the D-th cycle, port ready again
// the cycle after), hits and misses, the lock and PID state returned, the lock
// clearing of migrating reads and set scans, the PID filter of a set scan, and the
// install way choice (hit way, free way, unlocked way, refusal when all are locked),
// against a reference model kept in the testbench.
module tb_l2_cache;
  import mig_pkg::*;

  localparam int unsigned SETS = L2_SETS;
  localparam int unsigned WAYS = L2_WAYS;
  localparam int unsigned D    = D_CYC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req_valid = 0, req_ready, req_lock = 0;
  cache_op_e req_op = OP_READ;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [PID_W-1:0] req_pid = '0;
  logic [LINE_W-1:0] req_data = '0;
  logic rsp_valid, rsp_ok;
  logic [WAYS-1:0] rsp_match, rsp_locked;
  logic [ADDR_W-1:0] rsp_addr [WAYS];
  logic [PID_W-1:0] rsp_pid [WAYS];
  logic [LINE_W-1:0] rsp_data [WAYS];

  l2_cache dut (.*);

  int t_acc, t_rsp;
  task automatic op(input cache_op_e o, input logic [ADDR_W-1:0] a, input logic [PID_W-1:0] p,
                    input logic l, input logic [LINE_W-1:0] d);
    @(negedge clk);
    req_valid = 1; req_op = o; req_addr = a; req_pid = p; req_lock = l; req_data = d;
    while (!req_ready) @(negedge clk);
    t_acc = cycle;
    @(negedge clk);
    req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    t_rsp = cycle;
    check(!req_ready, "port busy during response cycle");
    @(negedge clk);
    check(req_ready, "port ready after D cycles");
  endtask

  function automatic logic [ADDR_W-1:0] la(input int tag, input int set);
    return ADDR_W'((tag << ($clog2(SETS) + OFF_W)) | (set << OFF_W));
  endfunction

  int nm;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // miss on an empty cache, timing
    op(OP_READ, la(5, 3), 0, 0, '0);
    check(t_rsp - t_acc == int'(D) - 1, $sformatf("response after %0d cycles", t_rsp - t_acc + 1));
    check(rsp_match == '0 && !rsp_ok, "miss on empty cache");
    // fill set 3 with 8 lines: tags 0..7, pid = tag%2, locked for even tags
    for (int t = 0; t < 8; t++) begin
      op(OP_INSTALL, la(t, 3), PID_W'(t % 2), (t % 2) == 0, {8{32'(t * 7 + 1)}});
      check(rsp_ok && rsp_match == WAYS'(1) << t, $sformatf("install tag %0d into way %0d", t, t));
    end
    op(OP_READ, la(6, 3), 0, 0, '0);
    check(rsp_ok && rsp_match == WAYS'(1) << 6 && rsp_data[6] == {8{32'(43)}} &&
          rsp_addr[6] == la(6, 3) && rsp_pid[6] == 0, "read hit returns line");
    check(rsp_locked == 8'b0101_0101, "lock bits of the set");
    op(OP_MIG_READ, la(1, 3), 0, 0, '0);
    check(!rsp_ok && rsp_match == '0, "migrating read of an unlocked line does not match");
    op(OP_MIG_READ, la(2, 3), 0, 0, '0);
    check(rsp_ok && rsp_match == 8'b0000_0100, "migrating read of a locked line");
    op(OP_READ, la(2, 3), 0, 0, '0);
    check(rsp_locked[2] == 1'b0, "migrating read clears the lock");
    // set scan for PID 0: locked even tags except 2 -> ways 0,4,6
    op(OP_SET_SCAN, la(0, 3), 0, 0, '0);
    check(rsp_match == 8'b0101_0001, $sformatf("set scan match %b", rsp_match));
    op(OP_SET_SCAN, la(0, 3), 0, 0, '0);
    check(rsp_match == '0, "set scan cleared the locks");
    op(OP_SET_SCAN, la(0, 4), 0, 0, '0);
    check(rsp_match == '0, "empty set scan");
    // install with a full set: replaces the first unlocked way (way 0 now unlocked)
    op(OP_INSTALL, la(9, 3), 3, 1, '1);
    check(rsp_ok && rsp_match == 8'b0000_0001, "install replaces first unlocked way");
    // re-install of a present tag goes to its way
    op(OP_INSTALL, la(5, 3), 3, 1, '1);
    check(rsp_ok && rsp_match == 8'b0010_0000, "install of present line reuses its way");
    // lock every way, then an install must be refused
    for (int t = 0; t < 8; t++) op(OP_INSTALL, (t == 0) ? la(9, 3) : la(t, 3), 3, 1, '0);
    op(OP_INSTALL, la(12, 3), 3, 1, '0);
    check(!rsp_ok, "install refused when all ways are locked");
    op(OP_SET_SCAN, la(0, 3), 3, 0, '0);
    check(rsp_match == '1, "all ways locked for PID 3");
    // other sets unaffected
    op(OP_READ, la(1, 4), 0, 0, '0);
    check(!rsp_ok, "other set untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
