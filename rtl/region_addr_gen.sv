// region_addr_gen: Region Registers and the sequential address generator of RCM.
//
// Holds NUM_RR (default 4) pairs of region registers. Each pair gives a start byte
// address and an end byte address one past the region, both line aligned; a pair
// with start >= end is empty. After a load, the block presents on cur_addr, one by
// one, every line address of region 0, then region 1, and so on, skipping empty
// pairs. The consumer pulses `advance` when it has issued the current address; the
// next address is presented in the following cycle, so a new address is available
// every cycle. cur_valid falls when all regions are exhausted.
//
// Start/end pairs and four pairs fitting one 32-byte block follow the text; the
// exclusive end address and the empty-pair encoding are this design's own choices.
module region_addr_gen
  import mig_pkg::*;
#(
  parameter int unsigned NRR = NUM_RR
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  region_t [NRR-1:0]      load_regions,
  input  logic                   advance,
  output logic                   cur_valid,
  output logic [ADDR_W-1:0]      cur_addr
);
  localparam int unsigned RW = $clog2(NRR + 1);

  logic [RW-1:0]     r_q, r_sel;
  logic [ADDR_W-1:0] pos_q;
  region_t [NRR-1:0] regions;

  // First position at or after (r_q, pos_q) that lies inside a region.
  always_comb begin
    logic [ADDR_W-1:0] p;
    p         = '0;
    cur_valid = 1'b0;
    cur_addr  = '0;
    r_sel     = RW'(NRR);
    for (int r = NRR - 1; r >= 0; r--) begin
      if (RW'(r) >= r_q) begin
        p = (RW'(r) == r_q) ? pos_q : regions[r].start_a;
        if (p < regions[r].end_a) begin
          cur_valid = 1'b1;
          cur_addr  = p;
          r_sel     = RW'(r);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regions <= '0;
      r_q     <= RW'(NRR);
      pos_q   <= '0;
    end else if (load) begin
      regions <= load_regions;
      r_q     <= '0;
      pos_q   <= load_regions[0].start_a;
    end else if (advance && cur_valid) begin
      r_q     <= r_sel;
      pos_q   <= cur_addr + ADDR_W'(LINE_BYTES);
    end
  end
endmodule
