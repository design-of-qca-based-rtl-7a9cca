// qca_pkg: types and constants shared by the QCA memory-cell models.
//
// A QCA circuit is clocked by four clock signals, Clock 0 to Clock 3. Each
// one passes in turn through four phases: Switch (cells polarise and the
// logic is computed), Hold (the result is stable; the zone acts as a latch),
// Release and Relax (cells lose their polarisation). The four clocks are
// the same waveform, each one a quarter period behind the one before, so
// data moves one clock zone forward every quarter period.
//
// In this RTL one cycle of the simulation clock is one quarter of the QCA
// clock period T (one clock-zone step). A delay of n quarter periods is
// therefore n cycles.
package qca_pkg;

  // Number of QCA clock signals and of phases in one clock period.
  localparam int unsigned NUM_CLOCKS = 4;

  // The four phases in the order a clock zone goes through them.
  typedef enum logic [1:0] {
    PH_SWITCH  = 2'd0,
    PH_HOLD    = 2'd1,
    PH_RELEASE = 2'd2,
    PH_RELAX   = 2'd3
  } qca_phase_t;

  // Phase of every clock signal, index = clock number.
  typedef qca_phase_t [NUM_CLOCKS-1:0] qca_phases_t;

endpackage
