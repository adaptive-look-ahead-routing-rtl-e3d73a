// Self-checking testbench of pref_port_unit.
// Drives random and tied free-credit counts and checks that the preference
// word equals the comparison of the counts one clock earlier, and that reset
// clears it.
module tb_pref_port_unit;
  import la_noc_pkg::*;

  localparam int unsigned CONG_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CONG_W-1:0] cong_free [NUM_DIRS];
  pref_t pref;
  int checks = 0, failures = 0, cycles = 0;
  int n_ties = 0, n_ne = 0, n_se = 0;

  pref_port_unit #(.CONG_W(CONG_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    pref_t exp_p;
    int e, n, s;
    for (int d = 0; d < NUM_DIRS; d++) cong_free[d] = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pref !== '0) begin failures++; $display("FAIL reset value %b", pref); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      e = $urandom_range(0, 15);
      n = (i % 5 == 0) ? e : $urandom_range(0, 15);
      s = (i % 7 == 0) ? e : $urandom_range(0, 15);
      cong_free[DIR_EAST]  = CONG_W'(e);
      cong_free[DIR_NORTH] = CONG_W'(n);
      cong_free[DIR_SOUTH] = CONG_W'(s);
      cong_free[DIR_WEST]  = CONG_W'($urandom_range(0, 15));
      exp_p.ne_take_y = (n > e);
      exp_p.se_take_y = (s > e);
      if (n == e || s == e) n_ties++;
      if (exp_p.ne_take_y) n_ne++;
      if (exp_p.se_take_y) n_se++;
      // Not visible before the clock edge (one-cycle transfer latency).
      #1;
      @(posedge clk);
      #1;
      checks++;
      if (pref !== exp_p) begin
        failures++;
        $display("FAIL i=%0d e=%0d n=%0d s=%0d got %b exp %b", i, e, n, s, pref, exp_p);
      end
    end
    // Latency: a change shows exactly one clock later.
    @(negedge clk);
    cong_free[DIR_EAST] = 4'd0; cong_free[DIR_NORTH] = 4'd9; cong_free[DIR_SOUTH] = 4'd0;
    @(posedge clk); #1;
    @(negedge clk);
    cong_free[DIR_EAST] = 4'd9; cong_free[DIR_NORTH] = 4'd0; cong_free[DIR_SOUTH] = 4'd0;
    #1;
    checks++;
    if (pref !== pref_t'(2'b10)) begin failures++; $display("FAIL before edge %b", pref); end
    @(posedge clk); #1;
    checks++;
    if (pref !== pref_t'(2'b00)) begin failures++; $display("FAIL after edge %b", pref); end
    // Asynchronous reset.
    cong_free[DIR_NORTH] = 4'd15; cong_free[DIR_SOUTH] = 4'd15; cong_free[DIR_EAST] = 4'd0;
    @(posedge clk); #1;
    rst_n = 1'b0; #1;
    checks++;
    if (pref !== '0) begin failures++; $display("FAIL async reset %b", pref); end
    checks++;
    if (n_ties == 0 || n_ne == 0 || n_se == 0) begin
      failures++; $display("FAIL coverage ties=%0d ne=%0d se=%0d", n_ties, n_ne, n_se);
    end
    $display("ties=%0d ne=%0d se=%0d", n_ties, n_ne, n_se);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 10000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
