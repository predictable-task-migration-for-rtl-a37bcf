// tdma_arbiter: TDMA slot table for a bus shared by running cores and the memory
// controller, with slots reserved for cache migration.
//
// Outside migration the bus is divided into slots of B cycles handed to the NA
// agents (active cores, then the memory controller) in round-robin order, so an
// agent waits at most B*NA - 1 cycles. While migrations run (mig_active), time is cut
// into periods of floor(D/B) slots: the first n_mig slots of every period carry the
// n_mig parallel migration chains, the remaining slots continue the agents' round
// robin across period boundaries. The bound on an agent's wait then becomes
//   n_mig*B*ceil(NA / (floor(D/B) - n_mig)) + NA*B - 1.
// An agent may start a request only in the first cycle of its slot (slot_start with
// grant); grant stays high for the whole slot.
//
// Slot width B, period D and the reserved-slots-first layout follow the text; the
// switch into and out of migration periods at the next slot boundary, the
// period of floor(D/B)*B cycles when D is not a multiple of B, and the agent order
// are this design's own choices.
module tdma_arbiter
  import mig_pkg::*;
#(
  parameter int unsigned NA = NUM_CORES + 1,   // agents: cores, then memory controller
  parameter int unsigned D  = D_CYC,
  parameter int unsigned B  = B_CYC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mig_active,
  input  logic [CORE_W:0]          n_mig,        // parallel migrations, < floor(D/B)
  output logic [NA-1:0]            grant,        // agent owning the current slot
  output logic                     slot_start,   // first cycle of a slot
  output logic                     mig_slot,     // current slot carries migration traffic
  output logic [CORE_W:0]          mig_idx       // which migration chain
);
  localparam int unsigned SLOTS = D / B;
  localparam int unsigned BW    = $clog2(B + 1);
  localparam int unsigned SW    = $clog2(SLOTS + 1);
  localparam int unsigned AW    = (NA > 1) ? $clog2(NA) : 1;

  logic [BW-1:0] cyc_q;       // cycle within slot
  logic [SW-1:0] sidx_q;      // slot within migration period
  logic          in_mig_q;    // current slot belongs to a migration period
  logic [AW-1:0] rr_q;        // next agent in the round robin
  logic [AW-1:0] owner_q;
  logic          mig_slot_q;
  logic [CORE_W:0] mig_idx_q;

  // decision for the slot that begins next
  logic          nxt_in_mig;
  logic [SW-1:0] nxt_sidx;
  logic          nxt_reserved;
  logic          last_cyc;

  assign last_cyc = (cyc_q == BW'(B - 1));

  always_comb begin
    if (in_mig_q && sidx_q != SW'(SLOTS - 1)) begin
      nxt_in_mig = 1'b1;                       // finish the period once started
      nxt_sidx   = sidx_q + SW'(1);
    end else begin
      nxt_in_mig = mig_active;
      nxt_sidx   = '0;
    end
    nxt_reserved = nxt_in_mig && mig_active && (SW'(n_mig) > nxt_sidx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q      <= BW'(B - 1);   // first slot begins right after reset
      sidx_q     <= SW'(SLOTS - 1);
      in_mig_q   <= 1'b0;
      rr_q       <= '0;
      owner_q    <= '0;
      mig_slot_q <= 1'b0;
      mig_idx_q  <= '0;
    end else if (last_cyc) begin
      cyc_q    <= '0;
      in_mig_q <= nxt_in_mig;
      sidx_q   <= nxt_sidx;
      if (nxt_reserved) begin
        mig_slot_q <= 1'b1;
        mig_idx_q  <= (CORE_W + 1)'(nxt_sidx);
      end else begin
        mig_slot_q <= 1'b0;
        owner_q    <= rr_q;
        rr_q       <= (rr_q == AW'(NA - 1)) ? '0 : rr_q + AW'(1);
      end
    end else begin
      cyc_q <= cyc_q + BW'(1);
    end
  end

  assign slot_start = (cyc_q == '0);
  assign mig_slot   = mig_slot_q;
  assign mig_idx    = mig_idx_q;
  always_comb begin
    grant = '0;
    if (!mig_slot_q) grant[owner_q] = 1'b1;
  end

  initial assert (SLOTS >= 2 && B >= 1) else $error("tdma_arbiter: needs D >= 2B");
  assert property (@(posedge clk) disable iff (!rst_n) mig_active |-> (SW'(n_mig) < SW'(SLOTS)));
endmodule
