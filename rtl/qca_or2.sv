// qca_or2: two-input OR built as a QCA majority gate.
//
// One input of a three-input majority gate is tied to a cell fixed at
// polarisation +1 (logic 1), so the output is 0 only when both remaining
// inputs are 0: MV(a, b, 1) = a | b. This construction follows the
// document. Combinational.
module qca_or2 (
  input  logic a,
  input  logic b,
  output logic out
);

  qca_majority u_mv (
    .a  (a),
    .b  (b),
    .c  (1'b1),   // fixed-polarisation cell, +1
    .out(out)
  );

endmodule
