// snoop_ctrl: target side of cache migration and the start-up synchronisation.
//
// Receiving: it watches the bus for messages addressed to its core. A push request
// is written into the local L2 as a locked line with its PID (one D-cycle cache
// access) and then acknowledged to the pushing core (a B-cycle bus message). INIT
// and ACK messages are handed to the local push block; INIT_ACK marks that the
// source has taken this core's region block.
//
// Synchronisation: before a migration phase the scheduler writes this core's target
// context (source core, scheme, PID, four Region Register pairs, start offset). On
// `arm`, a target whose offset is zero sends its INIT at once; that is the first
// message of the phase. Every snoop controller records the cycle in which the first
// message appears and sends its own INIT exactly `offset` cycles later, so chains
// whose offsets are B cycles apart never meet on the bus. The INIT carries the
// packed region block (4 x 2 x 32 bits = one 256-bit line).
//
// Timing: a push delivered in cycle t starts its install at t+1, the install
// response comes at t+D, and the ACK is requested at t+D+1. Buffers (two pushes,
// four acknowledgments) only matter if the bus or the cache port is busy, which the
// schedules avoid. Acknowledging even a line that found no free way (counted in
// install_fail) and the buffer depths are this design's own choices.
module snoop_ctrl
  import mig_pkg::*;
#(
  parameter int unsigned CORE_ID = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // scheduler side
  input  logic                  ctx_we,
  input  target_ctx_t           ctx_in,
  input  logic                  arm,
  // bus observation
  input  logic                  msg_start,
  input  logic                  dlv_valid,
  input  bus_msg_t              dlv_msg,
  // to the local push block
  output logic                  init_valid,
  output bus_msg_t              init_msg,
  output logic                  ack_valid,
  // cache port (installs)
  output logic                  c_req_valid,
  input  logic                  c_req_ready,
  output logic [ADDR_W-1:0]     c_req_addr,
  output logic [PID_W-1:0]      c_req_pid,
  output logic [LINE_W-1:0]     c_req_data,
  input  logic                  c_rsp_valid,
  input  logic                  c_rsp_ok,
  // bus transmit
  output logic                  tx_valid,
  output bus_msg_t              tx_msg,
  input  logic                  tx_grant,
  // status
  output logic                  tgt_started,
  output logic [CNT_W-1:0]      lines_installed,
  output logic [CNT_W-1:0]      install_fail,
  output logic [CNT_W-1:0]      t_first,
  output logic [CNT_W-1:0]      init_cycle
);
  localparam int unsigned IQ = 2;
  localparam int unsigned AQ = 4;

  target_ctx_t        ctx_q;
  logic               armed_q, first_seen_q;
  logic [CNT_W-1:0]   now_q;

  bus_msg_t           iq_q [IQ];
  logic [1:0]         iq_cnt_q;
  logic               inst_busy_q;
  logic [CORE_W-1:0]  inst_src_q;
  logic [CORE_W-1:0]  aq_q [AQ];
  logic [2:0]         aq_cnt_q;

  logic mine, rx_push, fire, send_ack, send_init, iq_pop, aq_push, aq_pop;

  assign mine       = dlv_valid && dlv_msg.dst == CORE_W'(CORE_ID);
  assign rx_push    = mine && dlv_msg.mtype == MSG_PUSH;
  assign init_valid = mine && dlv_msg.mtype == MSG_INIT;
  assign ack_valid  = mine && dlv_msg.mtype == MSG_ACK;
  assign init_msg   = dlv_msg;

  // INIT launch: offset 0 starts the phase; the others count from the first message.
  assign fire = armed_q &&
                ((ctx_q.offset == '0) ||
                 (first_seen_q && now_q == t_first + CNT_W'(ctx_q.offset)));

  // install path
  assign c_req_valid = (iq_cnt_q != 0) && !inst_busy_q;
  assign c_req_addr  = iq_q[0].addr;
  assign c_req_pid   = iq_q[0].pid;
  assign c_req_data  = iq_q[0].data;
  assign iq_pop      = c_req_valid && c_req_ready;
  assign aq_push     = inst_busy_q && c_rsp_valid;

  // transmit: acknowledgments first, then the INIT
  always_comb begin
    tx_msg      = '0;
    tx_msg.src  = CORE_W'(CORE_ID);
    send_ack    = aq_cnt_q != 0;
    send_init   = !send_ack && fire;
    tx_valid    = send_ack || send_init;
    if (send_ack) begin
      tx_msg.mtype = MSG_ACK;
      tx_msg.dst   = aq_q[0];
    end else begin
      tx_msg.mtype = MSG_INIT;
      tx_msg.dst   = ctx_q.src;
      tx_msg.mode  = ctx_q.mode;
      tx_msg.pid   = ctx_q.pid;
      tx_msg.data  = ctx_q.regions;
    end
  end
  assign aq_pop = send_ack && tx_grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_q           <= '0;
      armed_q         <= 1'b0;
      first_seen_q    <= 1'b0;
      now_q           <= '0;
      t_first         <= '0;
      init_cycle      <= '0;
      iq_cnt_q        <= '0;
      inst_busy_q     <= 1'b0;
      inst_src_q      <= '0;
      aq_cnt_q        <= '0;
      tgt_started     <= 1'b0;
      lines_installed <= '0;
      install_fail    <= '0;
      for (int i = 0; i < IQ; i++) iq_q[i] <= '0;
      for (int i = 0; i < AQ; i++) aq_q[i] <= '0;
    end else begin
      now_q <= now_q + CNT_W'(1);

      if (ctx_we) ctx_q <= ctx_in;

      // phase start
      if (arm) begin
        armed_q         <= ctx_q.valid;
        first_seen_q    <= 1'b0;
        tgt_started     <= 1'b0;
        lines_installed <= '0;
        install_fail    <= '0;
      end else begin
        if (msg_start && !first_seen_q) begin
          first_seen_q <= 1'b1;
          t_first      <= now_q;
        end
        if (send_init && tx_grant) begin
          armed_q    <= 1'b0;
          init_cycle <= now_q;
        end
        if (mine && dlv_msg.mtype == MSG_INIT_ACK) tgt_started <= 1'b1;
      end

      // install queue
      if (iq_pop) begin
        iq_q[0] <= iq_q[1];
        if (rx_push) iq_q[(iq_cnt_q == 2'd1) ? 0 : 1] <= dlv_msg;
      end else if (rx_push && iq_cnt_q < 2'(IQ)) begin
        iq_q[iq_cnt_q[0]] <= dlv_msg;
      end
      iq_cnt_q <= iq_cnt_q + 2'(rx_push && (iq_pop || iq_cnt_q < 2'(IQ))) - 2'(iq_pop);

      if (iq_pop) begin
        inst_busy_q <= 1'b1;
        inst_src_q  <= iq_q[0].src;
      end else if (aq_push) begin
        inst_busy_q <= 1'b0;
      end
      if (aq_push) begin
        if (c_rsp_ok) lines_installed <= lines_installed + CNT_W'(1);
        else          install_fail    <= install_fail + CNT_W'(1);
      end

      // acknowledgment queue
      if (aq_pop) begin
        for (int i = 0; i < AQ - 1; i++) aq_q[i] <= aq_q[i+1];
        if (aq_push) aq_q[2'(aq_cnt_q - 3'd1)] <= inst_src_q;
      end else if (aq_push) begin
        aq_q[aq_cnt_q[1:0]] <= inst_src_q;
      end
      aq_cnt_q <= aq_cnt_q + 3'(aq_push) - 3'(aq_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rx_push |-> (iq_cnt_q < 2'(IQ) || iq_pop));
  assert property (@(posedge clk) disable iff (!rst_n) aq_cnt_q <= 3'(AQ));
endmodule
