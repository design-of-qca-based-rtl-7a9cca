// qca_inverter: QCA inverter.
//
// A single input and a single output: the input is applied at one end of
// the structure and the complement is taken at the other end. Logically
// out = ~in, so a cell at polarisation +1 (logic 1) on the input gives
// polarisation -1 (logic 0) on the output and the other way round.
// Combinational; the function follows the paper.
module qca_inverter (
  input  logic in,
  output logic out
);

  always_comb out = ~in;

endmodule
