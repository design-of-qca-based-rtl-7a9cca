// tb_qca_and2: exhaustive self-checking test of qca_and2.
//
// Applies every input combination, compares the output with a 1 only when both inputs are 1,
// computed here, and prints the TB_RESULT line. A watchdog ends the run
// if it does not finish in time.
module tb_qca_and2;
  logic [1:0] v;
  logic y, exp_y;
  int checks = 0, failures = 0;

  qca_and2 dut (.a(v[0]), .b(v[1]), .out(y));

  initial begin
    for (int i = 0; i < (1 << 2); i++) begin
      v = 2'(i);
      #1;
      exp_y = (v == 2'b11) ? 1'b1 : 1'b0;
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
