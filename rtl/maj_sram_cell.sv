// maj_sram_cell: one-bit QCA memory cell built around a majority gate.
//
// Inputs Write/Read' (1 = write, 0 = read), Select and Input; outputs Q
// (the memory loop) and Output. The gate network is
//     ws    = WriteRead & Select              (first AND)
//     p     = ws | Q                          (OR, fed back from Q)
//     n     = ~ws & Q                         (inverter and second AND)
//     Q'    = MV(Input, p, n)                 (majority gate)
//     out   = Select & n                      (output AND)
// With ws = 1 the majority inputs are (Input, 1, 0), so Q takes Input
// (write). With ws = 0 they are (Input, Q, Q), so Q keeps its value
// whatever Input is (hold). The output shows Q only while the cell is
// selected and being read; with Select = 0 it is 0. This netlist follows
// the paper's logic diagram; that Output reads the second AND (and is
// therefore 0 during a write) is what the diagram draws.
//
// Timing. One clk cycle is one QCA clock zone step, T/4 (see qca_pkg).
// The inputs sit in the zone of clock IN_CLOCK and are taken, with Q
// updated, on the cycle in which that clock is in Switch, once per QCA
// period. The output zone is clock OUT_CLOCK: it is loaded when that clock
// is in Switch, (OUT_CLOCK - IN_CLOCK) mod 4 cycles after the inputs were taken, is
// valid (dout_valid = 1) for the following Hold phase and is then
// unpolarised (dout = 0, dout_valid = 0). The paper gives the output
// arriving in clock 1, a delay of T/4; the input zone, the once-per-period
// update and the valid flag are this design's choices.
//
// Reset (rst_n low, synchronous) clears Q; the paper does not say what
// the cell holds at power-up.
module maj_sram_cell
  import qca_pkg::*;
#(
  parameter int unsigned IN_CLOCK  = 0,
  parameter int unsigned OUT_CLOCK = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  qca_phases_t phase,
  input  logic        write_read,  // 1 = write, 0 = read
  input  logic        sel,
  input  logic        din,
  output logic        q,
  output logic        dout,
  output logic        dout_valid
);

  // ---- gate network (Fig. "Majority gate based SRAM cell") ----
  logic ws, ws_n, or_p, and_n, q_d, out_d;

  qca_and2     u_and_ws (.a(write_read), .b(sel),   .out(ws));
  qca_or2      u_or     (.a(ws),         .b(q),     .out(or_p));
  qca_inverter u_inv    (.in(ws),        .out(ws_n));
  qca_and2     u_and_n  (.a(ws_n),       .b(q),     .out(and_n));
  qca_majority u_mv     (.a(din),        .b(or_p),  .c(and_n), .out(q_d));
  qca_and2     u_and_o  (.a(sel),        .b(and_n), .out(out_d));

  // ---- clock zones ----
  if (IN_CLOCK >= NUM_CLOCKS || OUT_CLOCK >= NUM_CLOCKS || OUT_CLOCK == IN_CLOCK) begin : g_bad_zone
    $error("IN_CLOCK and OUT_CLOCK must be two different clocks in 0..3");
  end

  logic res_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q     <= 1'b0;
      res_q <= 1'b0;
    end else if (phase[IN_CLOCK] == PH_SWITCH) begin
      q     <= q_d;
      res_q <= out_d;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else if (phase[OUT_CLOCK] == PH_SWITCH) begin
      dout       <= res_q;
      dout_valid <= 1'b1;
    end else if (phase[OUT_CLOCK] == PH_HOLD) begin
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !dout_valid |-> !dout)
    else $error("dout is 1 while the output zone is unpolarised");

endmodule
