// tb_qca_inverter: exhaustive self-checking test of qca_inverter.
//
// Applies both input values, compares the output with the complement of the input,
// computed here, and prints the TB_RESULT line. A watchdog ends the run
// if it does not finish in time.
module tb_qca_inverter;
  logic [0:0] v;
  logic y, exp_y;
  int checks = 0, failures = 0;

  qca_inverter dut (.in(v[0]), .out(y));

  initial begin
    for (int i = 0; i < (1 << 1); i++) begin
      v = 1'(i);
      #1;
      exp_y = (v == 1'b0) ? 1'b1 : 1'b0;
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
