// tb_qca_sram_top: end-to-end test of both QCA memory cells on the shared
// four-phase clock.
//
// Part 1 is a directed sequence like a bench measurement of the cells:
// write 1, read it back twice while the data input toggles, write 0, read
// it back, and try to write with the cell not selected (majority cell) or
// read with EN = 0 (basic cell). Part 2 drives random inputs every cycle.
// Inputs change once per cycle; only the values present while Clock 0 is
// in Switch count. Reference models written here predict, per period,
// each cell's stored bit and output. The testbench checks
//   - the clock phases leaving the top (Clock k lags Clock 0 by k cycles),
//   - each cell's stored bit,
//   - that the majority cell's output is valid 1 cycle (T/4) and the basic
//     cell's 3 cycles (3T/4) after the inputs were taken, for one cycle,
//   - the output values, and 0 on an unpolarised output.
// It counts every mechanism of the two cells (write 0, write 1, selected
// read, unselected write attempt; write, read with EN = 1, read with
// EN = 0) and fails for one that never happened. A watchdog ends a run
// that hangs. The top has no parameters, so this is a full-size run.
module tb_qca_sram_top;
  import qca_pkg::*;

  localparam int unsigned RANDOM_PERIODS = 300;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  qca_phases_t phase;
  logic        period_start;
  logic        mj_wr = 1'b0, mj_sel = 1'b0, mj_din = 1'b0;
  logic        mj_q, mj_dout, mj_dout_valid;
  logic        bs_d = 1'b0, bs_en = 1'b0, bs_rw = 1'b0;
  logic        bs_loop, bs_dout, bs_dout_valid;

  int checks = 0, failures = 0;
  // mechanism counters
  int mj_w0 = 0, mj_w1 = 0, mj_rd = 0, mj_unsel = 0;
  int bs_w = 0, bs_rd_en = 0, bs_rd_dis = 0;
  int mj_read_ones = 0, bs_read_ones = 0;

  int   edge_n = 0, sample_edge = -1;
  logic m_mq = 1'b0, m_mout = 1'b0, m_bq = 1'b0, m_bout = 1'b0, m_pending = 1'b0;

  qca_sram_top dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .period_start(period_start),
    .mj_write_read(mj_wr), .mj_sel(mj_sel), .mj_din(mj_din),
    .mj_q(mj_q), .mj_dout(mj_dout), .mj_dout_valid(mj_dout_valid),
    .bs_d(bs_d), .bs_en(bs_en), .bs_rw(bs_rw),
    .bs_loop(bs_loop), .bs_dout(bs_dout), .bs_dout_valid(bs_dout_valid)
  );

  always #5 clk = ~clk;

  // reference models, one update per QCA period
  always @(posedge clk) begin
    edge_n++;
    if (!rst_n) begin
      m_mq = 1'b0; m_bq = 1'b0; m_pending = 1'b0;
    end else if (period_start) begin
      m_mout = 1'b0;
      if (mj_sel && mj_wr) begin
        m_mq = mj_din;
        if (mj_din) mj_w1++; else mj_w0++;
      end else if (mj_sel) begin
        m_mout = m_mq;
        mj_rd++;
        if (m_mq) mj_read_ones++;
      end else if (mj_wr) mj_unsel++;

      if (bs_rw) begin
        m_bq = bs_d;
        bs_w++;
      end else if (bs_en) begin
        bs_rd_en++;
        if (m_bq) bs_read_ones++;
      end else bs_rd_dis++;
      m_bout = bs_en & m_bq;

      m_pending   = 1'b1;
      sample_edge = edge_n;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // checks made every cycle, at the falling edge
  int cyc = 0;
  task automatic check_cycle();
    int age = edge_n - sample_edge;
    for (int k = 0; k < NUM_CLOCKS; k++)
      check(int'(phase[k]) == ((cyc - k) % 4 + 4) % 4, "clock phase");
    check(mj_q == m_mq, "majority cell Q");
    check(bs_loop == m_bq, "basic cell stored bit");
    if (m_pending && age == 1) begin
      check(mj_dout_valid, "majority output not valid T/4 after the inputs");
      check(mj_dout == m_mout, "majority output value");
    end else begin
      check(!mj_dout_valid && !mj_dout, "majority output outside its hold phase");
    end
    if (m_pending && age == 3) begin
      check(bs_dout_valid, "basic output not valid 3T/4 after the inputs");
      check(bs_dout == m_bout, "basic output value");
    end else begin
      check(!bs_dout_valid && !bs_dout, "basic output outside its hold phase");
    end
    cyc++;
  endtask

  // hold one set of inputs for a whole period, checking every cycle
  task automatic period(input logic wr, sel, din, rw, en, d);
    mj_wr = wr; mj_sel = sel; mj_din = din;
    bs_rw = rw; bs_en = en;   bs_d = d;
    repeat (4) begin
      @(negedge clk);
      check_cycle();
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_cycle();
    //      majority: W/R' Sel In    basic: R/W EN  D
    period(1'b1, 1'b1, 1'b1,  1'b1, 1'b1, 1'b1);   // write 1
    period(1'b0, 1'b1, 1'b0,  1'b0, 1'b1, 1'b0);   // read, data input 0
    period(1'b0, 1'b1, 1'b1,  1'b0, 1'b1, 1'b1);   // read, data input 1
    period(1'b1, 1'b0, 1'b0,  1'b0, 1'b0, 1'b0);   // unselected write / read with EN=0
    period(1'b0, 1'b1, 1'b0,  1'b0, 1'b1, 1'b0);   // still 1
    period(1'b1, 1'b1, 1'b0,  1'b1, 1'b1, 1'b0);   // write 0
    period(1'b0, 1'b1, 1'b1,  1'b0, 1'b1, 1'b1);   // read 0
    check(mj_read_ones == 3 && bs_read_ones == 3, "directed reads of 1");

    repeat (RANDOM_PERIODS * 4) begin
      mj_wr = 1'($urandom); mj_sel = 1'($urandom); mj_din = 1'($urandom);
      bs_rw = 1'($urandom); bs_en  = 1'($urandom); bs_d   = 1'($urandom);
      @(negedge clk);
      check_cycle();
    end

    $display("majority cell: writes of 0 %0d, of 1 %0d, reads %0d, unselected writes %0d",
             mj_w0, mj_w1, mj_rd, mj_unsel);
    $display("basic cell: writes %0d, reads with EN=1 %0d, with EN=0 %0d",
             bs_w, bs_rd_en, bs_rd_dis);
    check(mj_w0 > 0 && mj_w1 > 0 && mj_rd > 0 && mj_unsel > 0, "a majority-cell mode never happened");
    check(bs_w > 0 && bs_rd_en > 0 && bs_rd_dis > 0, "a basic-cell mode never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RANDOM_PERIODS * 4 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
