// push_block: source-side engine that pushes a migrating task's locked L2 lines to
// the target core's cache.
//
// A migration is a chain of push transactions. Each is a cache read at the source
// (D cycles), a push request on the bus (B cycles), a locked write at the target
// (D cycles, done by the target's snoop_ctrl) and an acknowledgment back (B cycles).
// The engine implements six schemes that differ only in which lines are found and
// in when the next read and the next push may start:
//
//   RCM          line addresses from the Region Registers; next read only after
//                the previous line was acknowledged.   T = Cn * 2(B+D)
//   CCMP         as RCM, but at most two lines pending (read done, not yet
//                acknowledged), so two reads run back to back per 2(B+D).
//   SCMP         reads stream back to back, every line pushed when read.
//                T = Cn*D + 2B + D
//   SSCM         every set read once; matching locked lines of the task's PID are
//                held in a set buffer and pushed one after the other, each as soon
//                as the previous acknowledgment arrives.  T = S*D + Cn*(2B+D)
//   SLOTTED      SSCM in fixed slots of 2(B+D): an empty set read is padded by
//                D+2B, and every extra line of a set costs a dummy ("fake") read
//                of D before its push.  T = (empty sets + Cn) * 2(B+D)
//   SLOTTED_PIPE slotted reads and fake reads of D each, issued back to back
//                without waiting for acknowledgments.
//                T <= (empty sets + Cn)*D + 2B + D
// (S = number of sets, Cn = locked lines of the task; RCM counts every address in
// the regions, and an address whose line is missing or unlocked costs one read.)
//
// Start: either `start` with a configuration (the scheduler writes the Region
// Registers directly, for a single migration), or an INIT message from the target
// carrying the packed Region Registers (synchronised parallel migrations). An INIT
// is taken in D cycles, answered with INIT_ACK, and the chain starts when that
// INIT_ACK has left the bus, so the set-up costs 2B+D as in the text. The D-cycle
// take-in of the region block is this design's own choice of where that D lies.
//
// Timing: a cycle that sees a read response, a fake-read end or an acknowledgment
// lets the next read or push start in the very next cycle, so the measured delay
// `mig_cycles` (cycles from the first read to the cycle after the last
// acknowledgment) equals the closed forms above when the bus grants at once.
// Unlocking the source copy on the read, the two-entry ready queue and the
// empty-set padding applied also to the last set are this design's own choices.
module push_block
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
  // direct start by the scheduler
  input  logic                  start,
  input  mig_mode_e             start_mode,
  input  logic [CORE_W-1:0]     start_target,
  input  logic [PID_W-1:0]      start_pid,
  input  region_t [NUM_RR-1:0]  start_regions,
  // bus deliveries addressed to this core
  input  logic                  init_valid,
  input  bus_msg_t              init_msg,
  input  logic                  ack_valid,
  // cache port
  output logic                  c_req_valid,
  input  logic                  c_req_ready,
  output cache_op_e             c_req_op,
  output logic [ADDR_W-1:0]     c_req_addr,
  output logic [PID_W-1:0]      c_req_pid,
  input  logic                  c_rsp_valid,
  input  logic [WAYS-1:0]       c_rsp_match,
  input  logic [ADDR_W-1:0]     c_rsp_addr [WAYS],
  input  logic [LINE_W-1:0]     c_rsp_data [WAYS],
  // bus transmit
  output logic                  tx_valid,
  output bus_msg_t              tx_msg,
  input  logic                  tx_grant,
  // status
  output logic                  busy,
  output logic                  done,
  output logic [CNT_W-1:0]      mig_cycles,
  output logic [CNT_W-1:0]      lines_pushed,
  output logic [CNT_W-1:0]      line_reads,
  output logic [CNT_W-1:0]      set_reads,
  output logic [CNT_W-1:0]      fake_reads,
  output logic [CNT_W-1:0]      added_delays,
  output logic [CNT_W-1:0]      skipped_reads
);
  localparam int unsigned RQ_D  = 2;
  localparam int unsigned SW    = $clog2(SETS + 1);
  localparam int unsigned TW    = $clog2(D + 2 * B + 1);
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [1:0] {P_IDLE, P_INIT_LOAD, P_INIT_ACK, P_INIT_WAIT} phase_e;
  typedef enum logic [1:0] {S_IDLE, S_READ, S_FAKE, S_ADDED} seq_e;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [LINE_W-1:0] data;
  } line_t;

  phase_e             phase_q;
  logic               run_q;
  seq_e               seq_q;
  logic [TW-1:0]      tim_q;
  mig_mode_e          mode_q;
  logic [CORE_W-1:0]  target_q;
  logic [PID_W-1:0]   pid_q;
  logic [SW-1:0]      set_q;
  logic [CNT_W-1:0]   run_cnt_q;
  logic [CNT_W-1:0]   out_q;            // pushes awaiting acknowledgment

  // ready queue: lines read and released for pushing
  line_t              rq_q [RQ_D];
  logic [1:0]         rq_cnt_q;
  // set buffer: further matching lines of the last set read
  logic [WAYS-1:0]    sb_mask_q;
  logic [ADDR_W-1:0]  sb_addr_q [WAYS];
  logic [LINE_W-1:0]  sb_data_q [WAYS];
  logic [ADDR_W-1:0]  rd_addr_q;        // address of the outstanding line read

  // region registers and address generator
  logic               ag_load, ag_adv, ag_valid;
  logic [ADDR_W-1:0]  ag_addr;
  region_t [NUM_RR-1:0] ag_load_regions;

  region_addr_gen #(.NRR(NUM_RR)) u_rr (
    .clk, .rst_n,
    .load(ag_load), .load_regions(ag_load_regions),
    .advance(ag_adv), .cur_valid(ag_valid), .cur_addr(ag_addr)
  );

  // ---------------------------------------------------------------- decisions
  logic rcm_fam, sets_left, work_left, sb_empty;
  logic step_read, step_fake, want_step, tx_line, use_sb, tx_gate, finish;
  logic [WW-1:0] sb_first, rsp_first;
  logic [WAYS-1:0] rsp_rest;

  function automatic logic [WW-1:0] lowest(input logic [WAYS-1:0] v);
    logic [WW-1:0] r;
    r = '0;
    for (int w = WAYS - 1; w >= 0; w--) if (v[w]) r = WW'(w);
    return r;
  endfunction

  always_comb begin
    rcm_fam   = (mode_q == MODE_RCM) || (mode_q == MODE_CCMP) || (mode_q == MODE_SCMP);
    sets_left = (set_q < SW'(SETS));
    sb_empty  = (sb_mask_q == '0);
    work_left = rcm_fam ? ag_valid : (sets_left || !sb_empty);
    sb_first  = lowest(sb_mask_q);
    rsp_first = lowest(c_rsp_match);
    rsp_rest  = c_rsp_match & ~(WAYS'(1) << rsp_first);

    step_read = 1'b0;
    step_fake = 1'b0;
    if (run_q && seq_q == S_IDLE) begin
      unique case (mode_q)
        MODE_RCM:   step_read = ag_valid && rq_cnt_q == 0 && out_q == 0;
        MODE_CCMP:  step_read = ag_valid && (CNT_W'(rq_cnt_q) + out_q) < CNT_W'(2);
        MODE_SCMP:  step_read = ag_valid && rq_cnt_q < 2'(RQ_D);
        MODE_SSCM:  step_read = sets_left && sb_empty && rq_cnt_q == 0 && out_q == 0;
        MODE_SLOTTED: begin
          step_fake = !sb_empty && rq_cnt_q == 0 && out_q == 0;
          step_read = sb_empty && sets_left && rq_cnt_q == 0 && out_q == 0;
        end
        MODE_SLOTTED_PIPE: begin
          step_fake = !sb_empty && rq_cnt_q < 2'(RQ_D);
          step_read = sb_empty && sets_left && rq_cnt_q < 2'(RQ_D);
        end
        default: ;
      endcase
    end
    want_step = step_read;

    // push issue
    use_sb  = (mode_q == MODE_SSCM) && rq_cnt_q == 0 && !sb_empty;
    tx_line = run_q && (rq_cnt_q != 0 || use_sb);
    unique case (mode_q)
      MODE_RCM, MODE_SSCM, MODE_SLOTTED: tx_gate = (out_q == 0);
      default:                           tx_gate = 1'b1;
    endcase

    finish = run_q && seq_q == S_IDLE && !work_left && rq_cnt_q == 0 && out_q == 0;
  end

  assign c_req_valid = want_step;
  assign c_req_op    = rcm_fam ? OP_MIG_READ : OP_SET_SCAN;
  assign c_req_addr  = rcm_fam ? ag_addr
                               : (ADDR_W'(set_q) << OFF_W);
  assign c_req_pid   = pid_q;
  assign ag_adv      = rcm_fam && want_step && c_req_ready;

  // transmit mux: INIT_ACK during set-up, else pushes
  always_comb begin
    tx_msg       = '0;
    tx_msg.src   = CORE_W'(CORE_ID);
    tx_msg.dst   = target_q;
    tx_msg.mode  = mode_q;
    tx_msg.pid   = pid_q;
    tx_valid     = 1'b0;
    if (phase_q == P_INIT_ACK) begin
      tx_valid     = 1'b1;
      tx_msg.mtype = MSG_INIT_ACK;
    end else begin
      tx_valid     = tx_line && tx_gate;
      tx_msg.mtype = MSG_PUSH;
      tx_msg.addr  = use_sb ? sb_addr_q[sb_first] : rq_q[0].addr;
      tx_msg.data  = use_sb ? sb_data_q[sb_first] : rq_q[0].data;
    end
  end

  logic push_go;
  assign push_go = tx_valid && tx_grant && phase_q != P_INIT_ACK;

  // configuration load
  always_comb begin
    ag_load         = 1'b0;
    ag_load_regions = start_regions;
    if (phase_q == P_IDLE && !run_q) begin
      if (start) ag_load = 1'b1;
      else if (init_valid) begin
        ag_load         = 1'b1;
        ag_load_regions = init_msg.data;
      end
    end
  end

  // ---------------------------------------------------------------- state
  logic          rq_push, rq_pop;
  line_t         rq_in;
  logic          fake_end;

  always_comb begin
    fake_end = (seq_q == S_FAKE) && tim_q == TW'(1);
    rq_push  = 1'b0;
    rq_in    = '0;
    if (seq_q == S_READ && c_rsp_valid && c_rsp_match != '0 && mode_q != MODE_SSCM) begin
      rq_push    = 1'b1;
      rq_in.addr = rcm_fam ? rd_addr_q : c_rsp_addr[rsp_first];
      rq_in.data = c_rsp_data[rsp_first];
    end else if (fake_end) begin
      rq_push    = 1'b1;
      rq_in.addr = sb_addr_q[sb_first];
      rq_in.data = sb_data_q[sb_first];
    end
    rq_pop = push_go && !use_sb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= P_IDLE;
      run_q     <= 1'b0;
      seq_q     <= S_IDLE;
      tim_q     <= '0;
      mode_q    <= MODE_RCM;
      target_q  <= '0;
      pid_q     <= '0;
      set_q     <= '0;
      run_cnt_q <= '0;
      out_q     <= '0;
      rq_cnt_q  <= '0;
      sb_mask_q <= '0;
      rd_addr_q <= '0;
      done      <= 1'b0;
      mig_cycles    <= '0;
      lines_pushed  <= '0;
      line_reads    <= '0;
      set_reads     <= '0;
      fake_reads    <= '0;
      added_delays  <= '0;
      skipped_reads <= '0;
    end else begin
      done <= 1'b0;

      // ---- set-up phases
      unique case (phase_q)
        P_IDLE: begin
          if (!run_q && start) begin
            mode_q   <= start_mode;
            target_q <= start_target;
            pid_q    <= start_pid;
          end else if (!run_q && init_valid) begin
            mode_q   <= init_msg.mode;
            target_q <= init_msg.src;
            pid_q    <= init_msg.pid;
            phase_q  <= P_INIT_LOAD;
            tim_q    <= TW'(D);
          end
        end
        P_INIT_LOAD: begin
          tim_q <= tim_q - TW'(1);
          if (tim_q == TW'(1)) phase_q <= P_INIT_ACK;
        end
        P_INIT_ACK: begin
          if (tx_grant) begin
            if (B > 1) begin
              phase_q <= P_INIT_WAIT;
              tim_q   <= TW'(B - 1);
            end else phase_q <= P_IDLE;
          end
        end
        P_INIT_WAIT: begin
          tim_q <= tim_q - TW'(1);
          if (tim_q == TW'(1)) phase_q <= P_IDLE;
        end
        default: ;
      endcase

      // entering the run
      if ((phase_q == P_IDLE && !run_q && start) ||
          (phase_q == P_INIT_ACK && tx_grant && B == 1) ||
          (phase_q == P_INIT_WAIT && tim_q == TW'(1))) begin
        run_q     <= 1'b1;
        run_cnt_q <= '0;
        set_q     <= '0;
        out_q     <= '0;
        rq_cnt_q  <= '0;
        sb_mask_q <= '0;
        seq_q     <= S_IDLE;
        lines_pushed  <= '0;
        line_reads    <= '0;
        set_reads     <= '0;
        fake_reads    <= '0;
        added_delays  <= '0;
        skipped_reads <= '0;
      end

      if (run_q) begin
        run_cnt_q <= run_cnt_q + CNT_W'(1);

        // ---- read / fake-read sequencer
        unique case (seq_q)
          S_IDLE: begin
            if (step_read && c_req_ready) begin
              seq_q     <= S_READ;
              rd_addr_q <= ag_addr;
              if (rcm_fam) line_reads <= line_reads + CNT_W'(1);
              else begin
                set_reads <= set_reads + CNT_W'(1);
                set_q     <= set_q + SW'(1);
              end
            end else if (step_fake) begin
              seq_q      <= S_FAKE;
              tim_q      <= TW'(D - 1);
              fake_reads <= fake_reads + CNT_W'(1);
            end
          end
          S_READ: begin
            if (c_rsp_valid) begin
              seq_q <= S_IDLE;
              if (c_rsp_match == '0) skipped_reads <= skipped_reads + CNT_W'(1);
              if (!rcm_fam) begin
                for (int w = 0; w < WAYS; w++) begin
                  sb_addr_q[w] <= c_rsp_addr[w];
                  sb_data_q[w] <= c_rsp_data[w];
                end
                sb_mask_q <= (mode_q == MODE_SSCM) ? c_rsp_match : rsp_rest;
                if (mode_q == MODE_SLOTTED && c_rsp_match == '0) begin
                  seq_q        <= S_ADDED;
                  tim_q        <= TW'(D + 2 * B);
                  added_delays <= added_delays + CNT_W'(1);
                end
              end
            end
          end
          S_FAKE, S_ADDED: begin
            tim_q <= tim_q - TW'(1);
            if (tim_q == TW'(1)) seq_q <= S_IDLE;
          end
          default: ;
        endcase

        // fake read releases one buffered line; SSCM pushes straight from the buffer
        if (fake_end || (push_go && use_sb))
          sb_mask_q[sb_first] <= 1'b0;

        // ---- ready queue
        if (rq_pop) begin
          rq_q[0] <= rq_q[1];
          if (rq_push) begin
            if (rq_cnt_q == 2'd1) rq_q[0] <= rq_in;
            else                  rq_q[1] <= rq_in;
          end
        end else if (rq_push) begin
          rq_q[rq_cnt_q[0]] <= rq_in;
        end
        rq_cnt_q <= rq_cnt_q + 2'(rq_push) - 2'(rq_pop);

        // ---- outstanding pushes
        out_q <= out_q + CNT_W'(push_go) - CNT_W'(ack_valid && out_q != 0);
        if (push_go) lines_pushed <= lines_pushed + CNT_W'(1);

        if (finish) begin
          run_q      <= 1'b0;
          done       <= 1'b1;
          mig_cycles <= run_cnt_q;
        end
      end
    end
  end

  assign busy = run_q || (phase_q != P_IDLE);

  // A push and an INIT_ACK never compete: the run starts only after set-up.
  assert property (@(posedge clk) disable iff (!rst_n) !(run_q && phase_q != P_IDLE));
  assert property (@(posedge clk) disable iff (!rst_n) rq_cnt_q <= 2'(RQ_D));
  initial assert (D >= 2 && B >= 1) else $error("push_block: needs D >= 2 and B >= 1");
endmodule
