// qca_clock_gen: four-phase QCA clock.
//
// Produces the phase of each of the four QCA clocks (Clock 0..3). A 2-bit
// counter advances once per simulation cycle, i.e. once per quarter of the
// QCA clock period T. Clock 0 is in its Switch phase when the counter is 0
// and then goes Hold, Release, Relax. Clock k runs the same sequence k
// quarter periods later, so at any time the four clocks are in four
// different phases and a value moves from zone k to zone k+1 in T/4.
//
// Interface: clk (one cycle = T/4), rst_n (active low, synchronous; restarts
// Clock 0 at Switch), phase[k] (current phase of Clock k), period_start
// (high in the cycle where Clock 0 is in Switch).
//
// The phase names and their order follow the paper; the quarter-period
// lag between neighbouring clocks and the encoding are this design's choice.
module qca_clock_gen
  import qca_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output qca_phases_t phase,
  output logic        period_start
);

  logic [1:0] tick_q;

  always_ff @(posedge clk) begin
    if (!rst_n) tick_q <= 2'd0;
    else        tick_q <= tick_q + 2'd1;
  end

  always_comb begin
    for (int k = 0; k < NUM_CLOCKS; k++) begin
      phase[k] = qca_phase_t'(tick_q - 2'(k));
    end
  end

  assign period_start = (tick_q == 2'd0);

  // Neighbouring clocks are always exactly one phase apart.
  always_comb begin
    for (int k = 1; k < NUM_CLOCKS; k++) begin
      assert (2'(phase[k-1]) == 2'(phase[k]) + 2'd1)
        else $error("clock %0d is not one phase behind clock %0d", k, k-1);
    end
  end

endmodule
