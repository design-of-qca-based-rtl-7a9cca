// tb_qca_clock_gen: self-checking test of the four-phase QCA clock.
//
// Counts cycles since reset and checks, every cycle, that Clock k is in
// phase (n - k) mod 4 of the sequence Switch, Hold, Release, Relax, that
// period_start marks every fourth cycle, and that each clock goes through
// all four phases in one period of four cycles. A second reset in the
// middle of the run must restart Clock 0 at Switch.
module tb_qca_clock_gen;
  import qca_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  qca_phases_t phase;
  logic        period_start;
  int          checks = 0, failures = 0;
  int          n;                       // cycles since reset
  int          seen [NUM_CLOCKS][4];    // phases seen in the current period

  qca_clock_gen dut (.clk(clk), .rst_n(rst_n), .phase(phase), .period_start(period_start));

  always #5 clk = ~clk;

  task automatic check_cycle();
    for (int k = 0; k < NUM_CLOCKS; k++) begin
      int e = ((n - k) % 4 + 4) % 4;
      checks++;
      if (int'(phase[k]) != e) begin
        failures++;
        $display("FAIL cycle %0d clock %0d phase %0d expected %0d", n, k, int'(phase[k]), e);
      end
      seen[k][int'(phase[k])]++;
    end
    checks++;
    if (period_start != (n % 4 == 0)) begin
      failures++;
      $display("FAIL cycle %0d period_start=%b", n, period_start);
    end
    if (n % 4 == 3) begin
      for (int k = 0; k < NUM_CLOCKS; k++)
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (seen[k][p] != 1) begin
            failures++;
            $display("FAIL clock %0d spent %0d cycles in phase %0d in one period", k, seen[k][p], p);
          end
          seen[k][p] = 0;
        end
    end
  endtask

  initial begin
    for (int k = 0; k < NUM_CLOCKS; k++) for (int p = 0; p < 4; p++) seen[k][p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    repeat (41) begin
      check_cycle();
      n++;
      @(negedge clk);
    end
    // reset again after a cycle count that is not a whole period
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NUM_CLOCKS; k++) for (int p = 0; p < 4; p++) seen[k][p] = 0;
    n = 0;
    repeat (16) begin
      check_cycle();
      n++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
