// qca_and2: two-input AND built as a QCA majority gate.
//
// One input of a three-input majority gate is tied to a cell fixed at
// polarisation -1 (logic 0), so the output is 1 only when both remaining
// inputs are 1: MV(a, b, 0) = a & b. This construction follows the
// document. Combinational.
module qca_and2 (
  input  logic a,
  input  logic b,
  output logic out
);

  qca_majority u_mv (
    .a  (a),
    .b  (b),
    .c  (1'b0),   // fixed-polarisation cell, -1
    .out(out)
  );

endmodule
