// qca_majority: three-input QCA majority gate (MV).
//
// The output is 1 when at least two of the three inputs are 1:
// out = a&b | b&c | c&a. In QCA this is five cells in a cross: three input
// cells around a central device cell that takes the polarisation of the
// majority of its neighbours, and an output cell. Purely combinational; the
// clock-zone delay of the surrounding circuit is modelled in the memory
// cells, not here. Function and equation follow the paper.
module qca_majority (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic out
);

  always_comb out = (a & b) | (b & c) | (c & a);

endmodule
