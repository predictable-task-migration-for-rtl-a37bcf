// l2_cache: private L2 with a lock bit and a PID tag on every line.
//
// A set-associative array (default 8 KB, 8 ways, 32-byte lines, so 32 sets) with a
// single access port whose every operation occupies it for D cycles, the L2 access
// latency of the evaluated platform. Lines carry a lock bit (as in lockable caches)
// and a process identifier, which Set-Scan migration needs to tell which locked lines
// belong to the migrating task.
//
// Port timing: an operation is accepted in a cycle with req_valid && req_ready. The
// array is read and updated at that clock edge; the response (a snapshot of the whole
// set before the update, plus a match mask) is presented with rsp_valid high in the
// D-th cycle of the access, and the port is ready again in the following cycle.
//   OP_READ      match = the hit way (any lock state); nothing changes.
//   OP_MIG_READ  match = the hit way if it is locked; that lock bit is cleared, since
//                the line now leaves with its task.
//   OP_SET_SCAN  set index taken from req_addr; match = valid, locked lines whose PID
//                equals req_pid; their lock bits are cleared.
//   OP_INSTALL   writes req_data/req_pid/req_lock. Way choice: the hit way, else the
//                first invalid way, else the first unlocked way; if every way is locked
//                the line is dropped and rsp_ok is low.
// Clearing the lock at the source and choosing the install way are this design's own
// choices; the text only requires that the target can hold the migrated lines. LRU
// replacement for ordinary misses and MESI coherence are outside this block.
module l2_cache
  import mig_pkg::*;
#(
  parameter int unsigned SETS = L2_SETS,
  parameter int unsigned WAYS = L2_WAYS,
  parameter int unsigned D    = D_CYC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  cache_op_e             req_op,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [PID_W-1:0]      req_pid,
  input  logic                  req_lock,
  input  logic [LINE_W-1:0]     req_data,
  output logic                  rsp_valid,
  output logic                  rsp_ok,
  output logic [WAYS-1:0]       rsp_match,
  output logic [WAYS-1:0]       rsp_locked,
  output logic [ADDR_W-1:0]     rsp_addr [WAYS],
  output logic [PID_W-1:0]      rsp_pid  [WAYS],
  output logic [LINE_W-1:0]     rsp_data [WAYS]
);
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned CW    = $clog2(D + 1);

  logic [TAG_W-1:0]  tag_q   [SETS][WAYS];
  logic [PID_W-1:0]  pid_q   [SETS][WAYS];
  logic [LINE_W-1:0] data_q  [SETS][WAYS];
  logic [WAYS-1:0]   valid_q [SETS];
  logic [WAYS-1:0]   lock_q  [SETS];

  logic [CW-1:0]     cnt_q;
  logic              accept;
  logic [IDX_W-1:0]  idx;
  logic [TAG_W-1:0]  tag;
  logic [WAYS-1:0]   hit_vec, scan_vec, free_vec, unl_vec, match_vec;
  logic [WAYS-1:0]   ins_vec;
  logic              ins_ok;

  assign req_ready = (cnt_q == '0);
  assign accept    = req_valid && req_ready;
  assign rsp_valid = (cnt_q == CW'(1));
  assign idx       = (SETS > 1) ? IDX_W'(req_addr[OFF_W +: IDX_W]) : '0;
  assign tag       = req_addr[ADDR_W-1 -: TAG_W];

  // lowest set bit of a vector
  function automatic logic [WAYS-1:0] first_one(input logic [WAYS-1:0] v);
    logic [WAYS-1:0] r;
    r = '0;
    for (int w = WAYS - 1; w >= 0; w--) if (v[w]) r = '0 | (WAYS'(1) << w);
    return r;
  endfunction

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w]  = valid_q[idx][w] && (tag_q[idx][w] == tag);
      scan_vec[w] = valid_q[idx][w] && lock_q[idx][w] && (pid_q[idx][w] == req_pid);
      free_vec[w] = !valid_q[idx][w];
      unl_vec[w]  = !lock_q[idx][w];
    end
    if (|hit_vec)       ins_vec = hit_vec;
    else if (|free_vec) ins_vec = first_one(free_vec);
    else                ins_vec = first_one(unl_vec);
    ins_ok = |ins_vec;
    unique case (req_op)
      OP_READ:     match_vec = hit_vec;
      OP_MIG_READ: match_vec = hit_vec & lock_q[idx];
      OP_SET_SCAN: match_vec = scan_vec;
      default:     match_vec = ins_vec;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      rsp_ok <= 1'b0;
      rsp_match  <= '0;
      rsp_locked <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        lock_q[s]  <= '0;
      end
    end else begin
      if (accept) cnt_q <= CW'(D - 1);
      else if (cnt_q != '0) cnt_q <= cnt_q - CW'(1);
      if (accept) begin
        rsp_match  <= match_vec;
        rsp_locked <= lock_q[idx];
        rsp_ok     <= (req_op == OP_INSTALL) ? ins_ok : |match_vec;
        unique case (req_op)
          OP_MIG_READ, OP_SET_SCAN: lock_q[idx] <= lock_q[idx] & ~match_vec;
          OP_INSTALL: begin
            for (int w = 0; w < WAYS; w++) begin
              if (ins_vec[w]) begin
                valid_q[idx][w] <= 1'b1;
                lock_q[idx][w]  <= req_lock;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  // Array contents and the set snapshot: no reset needed, qualified by valid_q.
  always_ff @(posedge clk) begin
    if (accept) begin
      for (int w = 0; w < WAYS; w++) begin
        rsp_addr[w] <= {tag_q[idx][w], IDX_W'(idx), OFF_W'(0)} ;
        rsp_pid[w]  <= pid_q[idx][w];
        rsp_data[w] <= data_q[idx][w];
        if (req_op == OP_INSTALL && ins_vec[w]) begin
          tag_q[idx][w]  <= tag;
          pid_q[idx][w]  <= req_pid;
          data_q[idx][w] <= req_data;
        end
      end
    end
  end

  initial assert (D >= 2) else $error("l2_cache: D must be at least 2");
endmodule
