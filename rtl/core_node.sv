// core_node: the migration hardware of one core's cache controller.
//
// Joins the core's private L2 (l2_cache), the source-side push block and the
// target-side snoop controller, and shares the L2's single access port between
// them and the core. Port priority: a target-side install first, then a push-block
// read, then the core. Under the migration schedules the three never meet: tasks are
// stalled during migration, and a core that is source of one chain and target of
// another has its reads and writes interleaved by the start offsets.
//
// The node has two bus requesters, its push block (PUSH, INIT_ACK) and its snoop
// controller (ACK, INIT), brought out as separate bus ports. Timing is that of the
// parts: every cache access takes D cycles; responses go back to whoever issued the
// access. The priority order is this design's own choice.
module core_node
  import mig_pkg::*;
#(
  parameter int unsigned CORE_ID = 0,
  parameter int unsigned SETS    = L2_SETS,
  parameter int unsigned WAYS    = L2_WAYS,
  parameter int unsigned D       = D_CYC,
  parameter int unsigned B       = B_CYC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core (CPU) access to the L2: fill/lock lines, check contents
  input  logic                  cpu_req_valid,
  output logic                  cpu_req_ready,
  input  cache_op_e             cpu_req_op,
  input  logic [ADDR_W-1:0]     cpu_req_addr,
  input  logic [PID_W-1:0]      cpu_req_pid,
  input  logic                  cpu_req_lock,
  input  logic [LINE_W-1:0]     cpu_req_data,
  output logic                  cpu_rsp_valid,
  output logic                  cpu_rsp_hit,
  output logic                  cpu_rsp_locked,
  output logic [PID_W-1:0]      cpu_rsp_pid,
  output logic [LINE_W-1:0]     cpu_rsp_data,
  // scheduler: direct start of a single migration with this core as source
  input  logic                  start,
  input  mig_mode_e             start_mode,
  input  logic [CORE_W-1:0]     start_target,
  input  logic [PID_W-1:0]      start_pid,
  input  region_t [NUM_RR-1:0]  start_regions,
  // scheduler: target context and phase start
  input  logic                  ctx_we,
  input  target_ctx_t           ctx_in,
  input  logic                  arm,
  // bus
  input  logic                  msg_start,
  input  logic                  dlv_valid,
  input  bus_msg_t              dlv_msg,
  output logic [1:0]            bus_req,     // [0] push block, [1] snoop controller
  output bus_msg_t              bus_msg [2],
  input  logic [1:0]            bus_gnt,
  // status
  output logic                  src_busy,
  output logic                  src_done,
  output logic [CNT_W-1:0]      mig_cycles,
  output logic [CNT_W-1:0]      lines_pushed,
  output logic [CNT_W-1:0]      line_reads,
  output logic [CNT_W-1:0]      set_reads,
  output logic [CNT_W-1:0]      fake_reads,
  output logic [CNT_W-1:0]      added_delays,
  output logic [CNT_W-1:0]      skipped_reads,
  output logic                  tgt_started,
  output logic [CNT_W-1:0]      lines_installed,
  output logic [CNT_W-1:0]      install_fail,
  output logic [CNT_W-1:0]      t_first,
  output logic [CNT_W-1:0]      init_cycle,
  output logic [CNT_W-1:0]      port_waits
);
  typedef enum logic [1:0] {OWN_NONE, OWN_SNOOP, OWN_PUSH, OWN_CPU} owner_e;

  // cache
  logic              c_valid, c_ready, c_lock;
  cache_op_e         c_op;
  logic [ADDR_W-1:0] c_addr;
  logic [PID_W-1:0]  c_pid;
  logic [LINE_W-1:0] c_data;
  logic              r_valid, r_ok;
  logic [WAYS-1:0]   r_match, r_locked;
  logic [ADDR_W-1:0] r_addr [WAYS];
  logic [PID_W-1:0]  r_pid  [WAYS];
  logic [LINE_W-1:0] r_data [WAYS];

  l2_cache #(.SETS(SETS), .WAYS(WAYS), .D(D)) u_l2 (
    .clk, .rst_n,
    .req_valid(c_valid), .req_ready(c_ready), .req_op(c_op), .req_addr(c_addr),
    .req_pid(c_pid), .req_lock(c_lock), .req_data(c_data),
    .rsp_valid(r_valid), .rsp_ok(r_ok), .rsp_match(r_match), .rsp_locked(r_locked),
    .rsp_addr(r_addr), .rsp_pid(r_pid), .rsp_data(r_data)
  );

  // push block
  logic              pb_valid, pb_ready;
  cache_op_e         pb_op;
  logic [ADDR_W-1:0] pb_addr;
  logic [PID_W-1:0]  pb_pid;
  logic              sn_valid, sn_ready;
  logic [ADDR_W-1:0] sn_addr;
  logic [PID_W-1:0]  sn_pid;
  logic [LINE_W-1:0] sn_data;
  logic              sn_init_valid, sn_ack_valid;
  bus_msg_t          sn_init_msg;
  owner_e            own_q;

  push_block #(.CORE_ID(CORE_ID), .SETS(SETS), .WAYS(WAYS), .D(D), .B(B)) u_push (
    .clk, .rst_n,
    .start, .start_mode, .start_target, .start_pid, .start_regions,
    .init_valid(sn_init_valid), .init_msg(sn_init_msg), .ack_valid(sn_ack_valid),
    .c_req_valid(pb_valid), .c_req_ready(pb_ready), .c_req_op(pb_op),
    .c_req_addr(pb_addr), .c_req_pid(pb_pid),
    .c_rsp_valid(r_valid && own_q == OWN_PUSH), .c_rsp_match(r_match),
    .c_rsp_addr(r_addr), .c_rsp_data(r_data),
    .tx_valid(bus_req[0]), .tx_msg(bus_msg[0]), .tx_grant(bus_gnt[0]),
    .busy(src_busy), .done(src_done), .mig_cycles, .lines_pushed, .line_reads,
    .set_reads, .fake_reads, .added_delays, .skipped_reads
  );

  snoop_ctrl #(.CORE_ID(CORE_ID)) u_snoop (
    .clk, .rst_n,
    .ctx_we, .ctx_in, .arm,
    .msg_start, .dlv_valid, .dlv_msg,
    .init_valid(sn_init_valid), .init_msg(sn_init_msg), .ack_valid(sn_ack_valid),
    .c_req_valid(sn_valid), .c_req_ready(sn_ready), .c_req_addr(sn_addr),
    .c_req_pid(sn_pid), .c_req_data(sn_data),
    .c_rsp_valid(r_valid && own_q == OWN_SNOOP), .c_rsp_ok(r_ok),
    .tx_valid(bus_req[1]), .tx_msg(bus_msg[1]), .tx_grant(bus_gnt[1]),
    .tgt_started, .lines_installed, .install_fail, .t_first, .init_cycle
  );

  // single-port arbitration: install > push-block read > core
  always_comb begin
    sn_ready      = c_ready;
    pb_ready      = c_ready && !sn_valid;
    cpu_req_ready = c_ready && !sn_valid && !pb_valid;
    c_valid = sn_valid || pb_valid || cpu_req_valid;
    c_op    = cpu_req_op;
    c_addr  = cpu_req_addr;
    c_pid   = cpu_req_pid;
    c_lock  = cpu_req_lock;
    c_data  = cpu_req_data;
    if (sn_valid) begin
      c_op   = OP_INSTALL;
      c_addr = sn_addr;
      c_pid  = sn_pid;
      c_lock = 1'b1;
      c_data = sn_data;
    end else if (pb_valid) begin
      c_op   = pb_op;
      c_addr = pb_addr;
      c_pid  = pb_pid;
      c_lock = 1'b0;
      c_data = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q      <= OWN_NONE;
      port_waits <= '0;
    end else begin
      if (c_valid && c_ready)
        own_q <= sn_valid ? OWN_SNOOP : (pb_valid ? OWN_PUSH : OWN_CPU);
      // a migration access that found the port taken
      if ((sn_valid && !sn_ready) || (pb_valid && !pb_ready))
        port_waits <= port_waits + CNT_W'(1);
    end
  end

  // core-side response: the matched (hit) way
  always_comb begin
    cpu_rsp_valid  = r_valid && own_q == OWN_CPU;
    cpu_rsp_hit    = r_ok;
    cpu_rsp_locked = 1'b0;
    cpu_rsp_pid    = '0;
    cpu_rsp_data   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (r_match[w]) begin
        cpu_rsp_locked = r_locked[w];
        cpu_rsp_pid    = r_pid[w];
        cpu_rsp_data   = r_data[w];
      end
    end
  end
endmodule
