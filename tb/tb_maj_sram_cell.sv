// tb_maj_sram_cell: self-checking test of the majority-gate QCA memory cell.
//
// The testbench makes the four clock phases itself (one cycle = T/4) and
// changes Write/Read', Select and Input to random values every cycle, so
// that only the values present while Clock 0 is in Switch may matter. A
// reference model written here stores Input only when Select = 1 and
// Write/Read' = 1, keeps Q otherwise, and predicts Output = Q during a
// selected read and 0 in every other case. Each cycle it checks
//   - Q against the model,
//   - that Output is valid in exactly one cycle per period, 1 cycle
//     (1/4 of the clock period) after the inputs were taken,
//   - the Output value while valid, and that it is 0 otherwise.
// It counts selected writes of 0 and of 1, selected reads, and unselected
// cycles with Write/Read' = 1 (which must not write), and fails if any of
// them never happened. A watchdog ends a run that hangs.
module tb_maj_sram_cell;
  import qca_pkg::*;

  localparam int unsigned LATENCY = 1;   // output in clock 1, inputs in clock 0
  localparam int unsigned PERIODS = 400;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [1:0]  tc = 2'd0;
  qca_phases_t phase;
  logic        wr = 1'b0, sel = 1'b0, din = 1'b0;
  logic        q, dout, dout_valid;

  int checks = 0, failures = 0;
  int n_write0 = 0, n_write1 = 0, n_read = 0, n_unsel_write = 0;
  int edge_n = 0, sample_edge = -1;
  logic m_q = 1'b0, m_out = 1'b0, m_pending = 1'b0;

  maj_sram_cell dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .write_read(wr), .sel(sel), .din(din),
    .q(q), .dout(dout), .dout_valid(dout_valid)
  );

  always #5 clk = ~clk;

  always_comb
    for (int k = 0; k < NUM_CLOCKS; k++) phase[k] = qca_phase_t'(tc - 2'(k));

  always @(posedge clk) begin
    edge_n++;
    if (!rst_n) begin
      tc        <= 2'd0;
      m_q       = 1'b0;
      m_pending = 1'b0;
    end else begin
      if (tc == 2'd0) begin
        m_out = 1'b0;
        if (sel && wr) begin
          m_q = din;
          if (din) n_write1++; else n_write0++;
        end else if (sel) begin
          m_out = m_q;
          n_read++;
        end else if (wr) n_unsel_write++;
        m_pending   = 1'b1;
        sample_edge = edge_n;
      end
      tc <= tc + 2'd1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s (q=%b out=%b valid=%b model q=%b out=%b)",
                                  $time, what, q, dout, dout_valid, m_q, m_out);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (PERIODS * 4) begin
      @(negedge clk);
      check(q == m_q, "Q");
      if (m_pending && edge_n - sample_edge == int'(LATENCY)) begin
        check(dout_valid, "output not valid after the expected delay");
        check(dout == m_out, "output value");
      end else begin
        check(!dout_valid, "output valid outside its hold phase");
        check(!dout, "unpolarised output is not 0");
      end
      wr  = 1'($urandom);
      sel = 1'($urandom);
      din = 1'($urandom);
    end
    checks++;
    if (n_write0 == 0 || n_write1 == 0 || n_read == 0 || n_unsel_write == 0) begin
      failures++;
      $display("FAIL a mode never happened");
    end
    $display("writes of 0 %0d, of 1 %0d, selected reads %0d, unselected writes %0d",
             n_write0, n_write1, n_read, n_unsel_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIODS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
