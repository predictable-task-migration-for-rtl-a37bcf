// mig_system: four cores with private lockable L2 caches that can hand a task's
// locked cache lines over to another core before the task resumes there.
//
// Each core has a core_node (L2 with lock bits and PID tags, a push block, a snoop
// controller); the nodes share one 256-bit cache-to-cache bus (mig_bus). The
// scheduler, the cores and the shared L3 are outside: their signals are ports.
//
// Two ways to start a migration phase:
//  * single migration: pulse start[src] with the scheme, target, PID and regions;
//    the source's push block begins at once.
//  * synchronised migrations: write each target's context (ctx_we/ctx_in: source,
//    scheme, PID, Region Registers, start offset), then pulse `arm`. The target with
//    offset 0 sends its INIT at once, every other target sends its INIT `offset`
//    cycles after the first message on the bus, each source takes its region block
//    and starts its chain. With offsets B cycles apart, up to floor(D/B) RCM or
//    Slotted-SSCM chains run at once without any bus or cache-port conflict.
// Per-core status shows each source's measured migration delay and event counts
// and each target's installed lines; stall_cycles counts bus waits.
// A TDMA slot table (tdma_arbiter) for the cores' and memory controller's ordinary
// bus traffic is kept alongside: while sources are pushing it reserves one slot per
// running chain in every D-cycle period. It only publishes the slot grants; the
// ordinary traffic it schedules is outside this design.
module mig_system
  import mig_pkg::*;
#(
  parameter int unsigned NC   = NUM_CORES,
  parameter int unsigned SETS = L2_SETS,
  parameter int unsigned WAYS = L2_WAYS,
  parameter int unsigned D    = D_CYC,
  parameter int unsigned B    = B_CYC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core (CPU) ports to each L2
  input  logic                  cpu_req_valid [NC],
  output logic                  cpu_req_ready [NC],
  input  cache_op_e             cpu_req_op    [NC],
  input  logic [ADDR_W-1:0]     cpu_req_addr  [NC],
  input  logic [PID_W-1:0]      cpu_req_pid   [NC],
  input  logic                  cpu_req_lock  [NC],
  input  logic [LINE_W-1:0]     cpu_req_data  [NC],
  output logic                  cpu_rsp_valid [NC],
  output logic                  cpu_rsp_hit   [NC],
  output logic                  cpu_rsp_locked[NC],
  output logic [PID_W-1:0]      cpu_rsp_pid   [NC],
  output logic [LINE_W-1:0]     cpu_rsp_data  [NC],
  // scheduler
  input  logic                  start         [NC],
  input  mig_mode_e             start_mode    [NC],
  input  logic [CORE_W-1:0]     start_target  [NC],
  input  logic [PID_W-1:0]      start_pid     [NC],
  input  region_t [NUM_RR-1:0]  start_regions [NC],
  input  logic                  ctx_we        [NC],
  input  target_ctx_t           ctx_in        [NC],
  input  logic                  arm,
  // status
  output logic                  src_busy      [NC],
  output logic                  src_done      [NC],
  output logic [CNT_W-1:0]      mig_cycles    [NC],
  output logic [CNT_W-1:0]      lines_pushed  [NC],
  output logic [CNT_W-1:0]      line_reads    [NC],
  output logic [CNT_W-1:0]      set_reads     [NC],
  output logic [CNT_W-1:0]      fake_reads    [NC],
  output logic [CNT_W-1:0]      added_delays  [NC],
  output logic [CNT_W-1:0]      skipped_reads [NC],
  output logic                  tgt_started   [NC],
  output logic [CNT_W-1:0]      lines_installed [NC],
  output logic [CNT_W-1:0]      install_fail  [NC],
  output logic [CNT_W-1:0]      t_first       [NC],
  output logic [CNT_W-1:0]      init_cycle    [NC],
  output logic [CNT_W-1:0]      port_waits    [NC],
  output logic [CNT_W-1:0]      stall_cycles,
  output logic [CNT_W-1:0]      msg_count,
  // TDMA slot table for the running cores' and memory controller's traffic
  output logic [NC:0]           tdma_grant,
  output logic                  tdma_slot_start,
  output logic                  tdma_mig_slot,
  output logic [CORE_W:0]       tdma_n_mig,
  output logic [CORE_W:0]       tdma_mig_idx
);
  logic [2*NC-1:0] req, gnt;
  bus_msg_t        msg [2*NC];
  logic            msg_start, dlv_valid;
  bus_msg_t        dlv_msg;

  mig_bus #(.NREQ(2 * NC), .B(B)) u_bus (
    .clk, .rst_n, .req, .msg, .gnt, .msg_start, .dlv_valid, .dlv_msg,
    .stall_cycles, .msg_count
  );

  // Migration slots are reserved while any source is pushing, one per running chain.
  always_comb begin
    tdma_n_mig = '0;
    for (int c = 0; c < NC; c++) tdma_n_mig = tdma_n_mig + (CORE_W + 1)'(src_busy[c]);
  end

  tdma_arbiter #(.NA(NC + 1), .D(D), .B(B)) u_tdma (
    .clk, .rst_n, .mig_active(tdma_n_mig != '0), .n_mig(tdma_n_mig),
    .grant(tdma_grant), .slot_start(tdma_slot_start), .mig_slot(tdma_mig_slot),
    .mig_idx(tdma_mig_idx)
  );

  for (genvar c = 0; c < NC; c++) begin : g_core
    bus_msg_t node_msg [2];
    assign msg[2*c]     = node_msg[0];
    assign msg[2*c + 1] = node_msg[1];

    core_node #(.CORE_ID(c), .SETS(SETS), .WAYS(WAYS), .D(D), .B(B)) u_node (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[c]), .cpu_req_ready(cpu_req_ready[c]),
      .cpu_req_op(cpu_req_op[c]), .cpu_req_addr(cpu_req_addr[c]),
      .cpu_req_pid(cpu_req_pid[c]), .cpu_req_lock(cpu_req_lock[c]),
      .cpu_req_data(cpu_req_data[c]), .cpu_rsp_valid(cpu_rsp_valid[c]),
      .cpu_rsp_hit(cpu_rsp_hit[c]), .cpu_rsp_locked(cpu_rsp_locked[c]),
      .cpu_rsp_pid(cpu_rsp_pid[c]), .cpu_rsp_data(cpu_rsp_data[c]),
      .start(start[c]), .start_mode(start_mode[c]), .start_target(start_target[c]),
      .start_pid(start_pid[c]), .start_regions(start_regions[c]),
      .ctx_we(ctx_we[c]), .ctx_in(ctx_in[c]), .arm,
      .msg_start, .dlv_valid, .dlv_msg,
      .bus_req(req[2*c +: 2]), .bus_msg(node_msg), .bus_gnt(gnt[2*c +: 2]),
      .src_busy(src_busy[c]), .src_done(src_done[c]), .mig_cycles(mig_cycles[c]),
      .lines_pushed(lines_pushed[c]), .line_reads(line_reads[c]),
      .set_reads(set_reads[c]), .fake_reads(fake_reads[c]),
      .added_delays(added_delays[c]), .skipped_reads(skipped_reads[c]),
      .tgt_started(tgt_started[c]), .lines_installed(lines_installed[c]),
      .install_fail(install_fail[c]), .t_first(t_first[c]),
      .init_cycle(init_cycle[c]), .port_waits(port_waits[c])
    );
  end
endmodule
