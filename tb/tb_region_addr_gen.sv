// tb_region_addr_gen: self-checking test of the Region Registers and the address
// generator. Loads four regions (one of them empty), steps through them with
// `advance` (with idle cycles in between), and compares every presented address with
// a list built here from the same start/end pairs; then checks that the generator
// runs dry and that a reload restarts it.
module tb_region_addr_gen;
  import mig_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic load = 0, advance = 0, cur_valid;
  region_t [NUM_RR-1:0] load_regions;
  logic [ADDR_W-1:0] cur_addr;

  region_addr_gen dut (.*);

  logic [ADDR_W-1:0] expq [$];

  task automatic build();
    expq.delete();
    for (int r = 0; r < NUM_RR; r++)
      for (logic [ADDR_W-1:0] a = load_regions[r].start_a; a < load_regions[r].end_a; a += LINE_BYTES)
        expq.push_back(a);
  endtask

  task automatic walk(input bit gaps);
    int n;
    n = 0;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    while (expq.size() > 0 && n < 200) begin
      check(cur_valid && cur_addr == expq[0],
            $sformatf("address %0d: got %h expected %h", n, cur_addr, expq[0]));
      void'(expq.pop_front());
      advance = 1;
      @(negedge clk);
      advance = 0;
      if (gaps && (n % 3 == 1)) @(negedge clk);
      n++;
    end
    check(!cur_valid, "generator runs dry");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!cur_valid, "nothing to migrate after reset");
    load_regions[0] = '{start_a: 32'h0000_1000, end_a: 32'h0000_10A0};   // 5 lines
    load_regions[1] = '{start_a: 32'h0000_2000, end_a: 32'h0000_2000};   // empty
    load_regions[2] = '{start_a: 32'h0004_0040, end_a: 32'h0004_00C0};   // 4 lines
    load_regions[3] = '{start_a: 32'h0000_0FE0, end_a: 32'h0000_1020};   // 2 lines
    build();
    walk(1'b0);
    build();
    walk(1'b1);
    // only the last region used
    load_regions[0] = '{start_a: 32'h10, end_a: 32'h0};
    load_regions[1] = '0;
    load_regions[2] = '0;
    build();
    walk(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
