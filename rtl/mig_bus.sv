// mig_bus: the shared cache-to-cache bus that carries push requests, acknowledgments
// and the start-up messages of a migration.
//
// Every message is point to point: it names its destination core, and only that core
// acts on it, so no other cache is disturbed. The bus is 256 bits wide, so a whole
// 32-byte line with its header moves as one message, which holds the bus for B cycles
// (the processor-to-processor delay, 2 cycles by default).
//
// Timing: a requester raises req with its message; when the bus is free the grant is
// given in the same cycle (fixed priority, lowest index first) and the message is on
// the bus for that cycle and the next B-1. The destination sees dlv_valid with the
// message in the last of those B cycles, so its work starts B cycles after the grant.
// msg_start pulses with every grant; snoop controllers use it to spot the first
// message of a migration phase. stall_cycles counts cycles in which some request had
// to wait; the migration schedules are built so that it stays zero. Fixed priority
// and the stall counter are this design's own choices.
module mig_bus
  import mig_pkg::*;
#(
  parameter int unsigned NREQ = 2 * NUM_CORES,
  parameter int unsigned B    = B_CYC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NREQ-1:0]   req,
  input  bus_msg_t          msg [NREQ],
  output logic [NREQ-1:0]   gnt,
  output logic              msg_start,
  output logic              dlv_valid,
  output bus_msg_t          dlv_msg,
  output logic [CNT_W-1:0]  stall_cycles,
  output logic [CNT_W-1:0]  msg_count
);
  localparam int unsigned CW = $clog2(B + 1);

  logic [CW-1:0] cnt_q;
  bus_msg_t      cur_q;
  bus_msg_t      sel_msg;
  logic          free;

  assign free = (cnt_q == '0);

  always_comb begin
    gnt     = '0;
    sel_msg = msg[0];
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt     = '0;
        gnt[i]  = free;
        sel_msg = msg[i];
      end
    end
  end

  assign msg_start = |gnt;
  // B == 1: the message is delivered in its grant cycle
  assign dlv_valid = (B == 1) ? msg_start : (cnt_q == CW'(1));
  assign dlv_msg   = (B == 1) ? sel_msg   : cur_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q        <= '0;
      cur_q        <= '0;
      stall_cycles <= '0;
      msg_count    <= '0;
    end else begin
      if (msg_start) begin
        cnt_q     <= CW'(B - 1);
        cur_q     <= sel_msg;
        msg_count <= msg_count + CNT_W'(1);
      end else if (cnt_q != '0) begin
        cnt_q <= cnt_q - CW'(1);
      end
      if ((req & ~gnt) != '0) stall_cycles <= stall_cycles + CNT_W'(1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) msg_start |-> free);
endmodule
