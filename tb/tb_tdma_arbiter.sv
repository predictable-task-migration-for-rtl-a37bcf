// tb_tdma_arbiter: self-checking test of the TDMA slot table.
//
// Run with D = 12, B = 2 and five agents (four running cores and the memory
// controller) as in the worked example with two parallel migrations: every 12-cycle
// period must open with two migration slots, and the agent slots must follow the
// round robin 0 1 2 3 | 4 0 1 2 | 3 4 0 1 ... across periods. The longest wait of
// each agent, measured from its slot starts, must equal B*NA - 1 without migration
// and n_mig*B*ceil(NA/(floor(D/B)-n_mig)) + NA*B - 1 with it. Switching back to
// plain round robin after the migration is checked too.
module tb_tdma_arbiter;
  import mig_pkg::*;

  localparam int unsigned NA = 5;
  localparam int unsigned D  = 12;
  localparam int unsigned B  = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic mig_active = 1;
  logic [CORE_W:0] n_mig = 3'd2;
  logic [NA-1:0] grant;
  logic slot_start, mig_slot;
  logic [CORE_W:0] mig_idx;

  tdma_arbiter #(.NA(NA), .D(D), .B(B)) dut (.*);

  // slot log: -1/-2 = migration slot 0/1, else agent
  int slots [$];
  int starts [NA][$];
  always @(posedge clk) if (rst_n && slot_start) begin
    if (mig_slot) slots.push_back(-1 - int'(mig_idx));
    else begin
      for (int a = 0; a < NA; a++) if (grant[a]) begin
        slots.push_back(a);
        starts[a].push_back(cycle);
      end
    end
    check($countones(grant) == (mig_slot ? 0 : 1), "one owner per agent slot");
  end

  function automatic int max_wait();
    int m;
    m = 0;
    for (int a = 0; a < NA; a++)
      for (int i = 1; i < starts[a].size(); i++)
        if (starts[a][i] - starts[a][i-1] - 1 > m) m = starts[a][i] - starts[a][i-1] - 1;
    return m;
  endfunction

  int exp_seq [18] = '{-1, -2, 0, 1, 2, 3, -1, -2, 4, 0, 1, 2, -1, -2, 3, 4, 0, 1};
  int bound, w;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (40 * D) @(negedge clk);
    for (int i = 0; i < 18; i++)
      check(slots[i] == exp_seq[i], $sformatf("slot %0d owner %0d expected %0d", i, slots[i], exp_seq[i]));
    bound = 2 * B * ((NA + (D / B - 2) - 1) / (D / B - 2)) + NA * B - 1;
    w = max_wait();
    check(w == bound, $sformatf("wait with 2 migrations %0d, bound %0d", w, bound));
    // one migration: bound shrinks
    n_mig = 3'd1;
    slots.delete();
    foreach (starts[a]) starts[a].delete();
    repeat (40 * D) @(negedge clk);
    bound = 1 * B * ((NA + (D / B - 1) - 1) / (D / B - 1)) + NA * B - 1;
    w = max_wait();
    check(w <= bound && w > int'(NA * B) - 1, $sformatf("wait with 1 migration %0d, bound %0d", w, bound));
    // back to plain TDMA
    mig_active = 0;
    repeat (2 * D) @(negedge clk);
    slots.delete();
    foreach (starts[a]) starts[a].delete();
    repeat (20 * D) @(negedge clk);
    w = max_wait();
    check(w == int'(NA * B) - 1, $sformatf("plain TDMA wait %0d expected %0d", w, NA * B - 1));
    for (int i = 1; i < 10; i++)
      check(slots[i] >= 0 && slots[i] == (slots[i-1] + 1) % int'(NA), "plain round robin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
