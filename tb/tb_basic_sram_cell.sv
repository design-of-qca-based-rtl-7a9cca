// tb_basic_sram_cell: self-checking test of the AND/OR/NOT QCA memory cell.
//
// The testbench makes the four clock phases itself (one cycle = T/4) and
// changes D, EN and R/W to random values every cycle, so that only the
// values present while Clock 0 is in Switch may matter. A reference model
// written here stores D when R/W = 1, keeps its bit when R/W = 0, and
// predicts Output = EN & bit. Each cycle the testbench checks
//   - the stored bit against the model,
//   - that Output is valid in exactly one cycle per period, 3 cycles
//     (3/4 of the clock period) after the inputs were taken,
//   - the Output value while valid, and that it is 0 otherwise.
// It counts writes, reads with EN = 1 and reads with EN = 0, and fails if
// any of them never happened. A watchdog ends a run that hangs.
module tb_basic_sram_cell;
  import qca_pkg::*;

  localparam int unsigned LATENCY = 3;   // output in clock 3, inputs in clock 0
  localparam int unsigned PERIODS = 400;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [1:0]  tc = 2'd0;
  qca_phases_t phase;
  logic        d = 1'b0, en = 1'b0, rw = 1'b0;
  logic        loop_q, dout, dout_valid;

  int checks = 0, failures = 0;
  int n_write = 0, n_read_en = 0, n_read_dis = 0, n_write_dis = 0;
  int edge_n = 0, sample_edge = -1;
  logic m_bit = 1'b0, m_out = 1'b0, m_pending = 1'b0;

  basic_sram_cell dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .d(d), .en(en), .rw(rw),
    .loop_q(loop_q), .dout(dout), .dout_valid(dout_valid)
  );

  always #5 clk = ~clk;

  always_comb
    for (int k = 0; k < NUM_CLOCKS; k++) phase[k] = qca_phase_t'(tc - 2'(k));

  // reference model: takes inputs on the cycle where Clock 0 is in Switch
  always @(posedge clk) begin
    edge_n++;
    if (!rst_n) begin
      tc        <= 2'd0;
      m_bit     = 1'b0;
      m_pending = 1'b0;
    end else begin
      if (tc == 2'd0) begin
        if (rw) begin
          m_bit = d;
          if (en) n_write++; else n_write_dis++;
        end else if (en) n_read_en++;
        else n_read_dis++;
        m_out       = en & m_bit;
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
      if (failures < 20) $display("FAIL t=%0t %s (bit=%b out=%b valid=%b model bit=%b out=%b)",
                                  $time, what, loop_q, dout, dout_valid, m_bit, m_out);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (PERIODS * 4) begin
      @(negedge clk);
      check(loop_q == m_bit, "stored bit");
      if (m_pending && edge_n - sample_edge == int'(LATENCY)) begin
        check(dout_valid, "output not valid after the expected delay");
        check(dout == m_out, "output value");
      end else begin
        check(!dout_valid, "output valid outside its hold phase");
        check(!dout, "unpolarised output is not 0");
      end
      d  = 1'($urandom);
      en = 1'($urandom);
      rw = 1'($urandom);
    end
    checks++;
    if (n_write == 0 || n_read_en == 0 || n_read_dis == 0 || n_write_dis == 0) begin
      failures++;
      $display("FAIL a mode never happened");
    end
    $display("writes %0d (with EN=0: %0d), reads with EN=1 %0d, with EN=0 %0d",
             n_write, n_write_dis, n_read_en, n_read_dis);
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
