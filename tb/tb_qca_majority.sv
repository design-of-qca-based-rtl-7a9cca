// tb_qca_majority: exhaustive self-checking test of qca_majority.
//
// Applies every input combination, compares the output with a 1 when at least two inputs are 1,
// computed here, and prints the TB_RESULT line. A watchdog ends the run
// if it does not finish in time.
module tb_qca_majority;
  logic [2:0] v;
  logic y, exp_y;
  int checks = 0, failures = 0;

  qca_majority dut (.a(v[0]), .b(v[1]), .c(v[2]), .out(y));

  initial begin
    for (int i = 0; i < (1 << 3); i++) begin
      v = 3'(i);
      #1;
      exp_y = ((int'(v[0]) + int'(v[1]) + int'(v[2])) >= 2) ? 1'b1 : 1'b0;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", v, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
