// basic_sram_cell: one-bit QCA memory cell built from AND, OR and NOT gates.
//
// Inputs D (data), EN (enable) and RW (1 = write, 0 = read); one output.
// The gate network is
//     w     = D & RW                   (first AND)
//     h     = loop & ~RW               (second AND, fed by the inverter)
//     loop' = w | h                    (OR; its output is the memory loop)
//     out   = loop' & EN               (output AND)
// With RW = 1 the loop takes D (write); with RW = 0 it keeps its value
// (hold), and EN = 1 shows it on the output (read). EN only gates the
// output; a write with EN = 0 still stores D. This netlist follows the
// document's logic diagram.
//
// Timing. One clk cycle is one QCA clock zone step, T/4 (see qca_pkg).
// The inputs sit in the zone of clock IN_CLOCK: they are taken, and the
// memory loop is updated, on the cycle in which that clock is in its
// Switch phase, so once per QCA period. The output sits in the zone of
// clock OUT_CLOCK. It is loaded when that clock is in Switch, i.e.
// (OUT_CLOCK - IN_CLOCK) mod 4 cycles after the inputs were taken, is valid
// (dout_valid = 1) for the following Hold phase and is then unpolarised
// (dout = 0, dout_valid = 0) until the next period. The paper gives the
// output arriving in clock 3, a delay of 3/4 T; the input zone, the
// one-update-per-period loop and the valid flag are this design's choices.
//
// Reset (rst_n low, synchronous) clears the stored bit; the paper does
// not say what the cell holds at power-up.
module basic_sram_cell
  import qca_pkg::*;
#(
  parameter int unsigned IN_CLOCK  = 0,
  parameter int unsigned OUT_CLOCK = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  qca_phases_t phase,
  input  logic        d,
  input  logic        en,
  input  logic        rw,          // 1 = write, 0 = read
  output logic        loop_q,      // value held in the memory loop
  output logic        dout,
  output logic        dout_valid
);

  // ---- gate network (Fig. "Basic SRAM cell") ----
  logic rw_n, and_w, and_h, loop_d, out_d;

  qca_and2     u_and_w  (.a(d),      .b(rw),   .out(and_w));
  qca_inverter u_inv    (.in(rw),    .out(rw_n));
  qca_and2     u_and_h  (.a(loop_q), .b(rw_n), .out(and_h));
  qca_or2      u_or     (.a(and_w),  .b(and_h),.out(loop_d));
  qca_and2     u_and_o  (.a(loop_d), .b(en),   .out(out_d));

  // ---- clock zones ----
  if (IN_CLOCK >= NUM_CLOCKS || OUT_CLOCK >= NUM_CLOCKS || OUT_CLOCK == IN_CLOCK) begin : g_bad_zone
    $error("IN_CLOCK and OUT_CLOCK must be two different clocks in 0..3");
  end

  logic res_q;   // output value on its way from the input zone

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loop_q <= 1'b0;
      res_q  <= 1'b0;
    end else if (phase[IN_CLOCK] == PH_SWITCH) begin
      loop_q <= loop_d;
      res_q  <= out_d;
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

  // An unpolarised output never carries a 1.
  assert property (@(posedge clk) disable iff (!rst_n) !dout_valid |-> !dout)
    else $error("dout is 1 while the output zone is unpolarised");

endmodule
