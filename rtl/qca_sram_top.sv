// qca_sram_top: the two QCA one-bit memory cells on one four-phase clock.
//
// One qca_clock_gen drives the phases of Clock 0..3 into both cells:
//   - maj_sram_cell, the majority-gate cell (inputs Write/Read', Select,
//     Input; outputs Q and Output; output delay T/4), and
//   - basic_sram_cell, the AND/OR/NOT cell (inputs D, EN, R/W; output
//     delay 3T/4),
// each with its own ports, so the two can be driven with the same pattern
// and their outputs compared. One clk cycle is one quarter of the QCA clock
// period T. The phases of the four clocks are brought out for observation.
// That both cells share one clock is this design's choice; the paper
// simulates each cell on its own.
module qca_sram_top
  import qca_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output qca_phases_t phase,
  output logic        period_start,
  // majority-gate cell
  input  logic        mj_write_read,
  input  logic        mj_sel,
  input  logic        mj_din,
  output logic        mj_q,
  output logic        mj_dout,
  output logic        mj_dout_valid,
  // basic cell
  input  logic        bs_d,
  input  logic        bs_en,
  input  logic        bs_rw,
  output logic        bs_loop,
  output logic        bs_dout,
  output logic        bs_dout_valid
);

  qca_clock_gen u_clk (
    .clk         (clk),
    .rst_n       (rst_n),
    .phase       (phase),
    .period_start(period_start)
  );

  maj_sram_cell u_maj (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase     (phase),
    .write_read(mj_write_read),
    .sel       (mj_sel),
    .din       (mj_din),
    .q         (mj_q),
    .dout      (mj_dout),
    .dout_valid(mj_dout_valid)
  );

  basic_sram_cell u_basic (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase     (phase),
    .d         (bs_d),
    .en        (bs_en),
    .rw        (bs_rw),
    .loop_q    (bs_loop),
    .dout      (bs_dout),
    .dout_valid(bs_dout_valid)
  );

endmodule
