// tb_mig_bus: self-checking test of the cache-to-cache message bus.
//
// Checks that a lone request is granted in its own cycle and delivered B-1 cycles
// later with its message intact, that the bus stays busy for B cycles, that
// simultaneous requests are served lowest index first one per B cycles, that every
// message is delivered exactly once, and that waiting cycles are counted.
module tb_mig_bus;
  import mig_pkg::*;

  localparam int unsigned NREQ = 2 * NUM_CORES;
  localparam int unsigned B    = B_CYC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NREQ-1:0] req = '0, gnt;
  bus_msg_t msg [NREQ];
  logic msg_start, dlv_valid;
  bus_msg_t dlv_msg;
  logic [CNT_W-1:0] stall_cycles, msg_count;

  mig_bus dut (.*);

  int gnt_cycle [NREQ];
  int dlv_cycle [NREQ];
  int ndlv;
  always @(posedge clk) begin
    for (int i = 0; i < NREQ; i++) if (gnt[i]) begin
      gnt_cycle[i] = cycle;
      req[i] <= 1'b0;
    end
    if (dlv_valid) begin
      dlv_cycle[dlv_msg.addr] = cycle;
      ndlv++;
      check(dlv_msg.data == {8{dlv_msg.addr}} && dlv_msg.src == CORE_W'(dlv_msg.addr / 2),
            "delivered message intact");
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NREQ; i++) begin
      msg[i] = '0;
      msg[i].mtype = MSG_PUSH;
      msg[i].src = CORE_W'(i / 2);
      msg[i].dst = CORE_W'((i / 2 + 1) % NUM_CORES);
      msg[i].addr = ADDR_W'(i);
      msg[i].data = {8{32'(i)}};
    end
    ndlv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single request
    @(negedge clk);
    req[3] = 1;
    #1;
    check(gnt == 8'b0000_1000 && msg_start, "lone request granted at once");
    repeat (B + 2) @(negedge clk);
    check(dlv_cycle[3] == gnt_cycle[3] + int'(B) - 1, "delivered in the B-th cycle");
    check(stall_cycles == 0, "no stall for a lone request");
    // all at once
    @(negedge clk);
    req = '1;
    repeat (NREQ * B + 4) @(negedge clk);
    for (int i = 0; i < NREQ; i++) begin
      check(gnt_cycle[i] == gnt_cycle[0] + i * int'(B), $sformatf("request %0d served in order", i));
      check(dlv_cycle[i] == gnt_cycle[i] + int'(B) - 1, $sformatf("request %0d delivery", i));
    end
    check(ndlv == NREQ + 1 && msg_count == CNT_W'(NREQ + 1), "each message delivered once");
    check(int'(stall_cycles) == (NREQ - 1) * int'(B), $sformatf("stall cycles %0d", stall_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
