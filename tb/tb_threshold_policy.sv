// tb_threshold_policy: self-checking test of the three-level threshold
// policy at its default parameters (sample every 400 master cycles = 0.1 us,
// at least 10 samples = 1 us between changes, thresholds 20 and 10 flits,
// divisors 5 / 8 / 16 for 800 / 500 / 250 MHz).
//
// The congestion input follows a random walk with bursts. A reference model
// in the testbench samples it at the same instants and applies the rules;
// after every sample the divisor must match the model. The test also checks
// that changes are never closer than 10 samples, and that all three levels
// and at least one change held back by the time limit occurred.
module tb_threshold_policy;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] congestion = '0;
  logic [DIV_W-1:0] req_div;
  logic sample, changed;
  int checks = 0, failures = 0;

  threshold_policy dut (.*);

  always #5 clk = ~clk;

  int cyc = 0, m_div = 8, m_since = 0, n_changes = 0, n_held = 0, last_change = -100;
  int n_high = 0, n_low = 0, n_norm = 0, spacing_bad = 0, smp = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (cyc % 400 == 0) begin
        int want;
        smp++;
        want = (congestion > 20) ? 5 : (congestion < 10) ? 16 : 8;
        m_since++;
        if (want != m_div) begin
          if (m_since >= 10) begin
            m_div = want;
            m_since = 0;
            n_changes++;
            if (smp - last_change < 10) spacing_bad++;
            last_change = smp;
          end else n_held++;
        end
        if (m_div == 5) n_high++;
        if (m_div == 8) n_norm++;
        if (m_div == 16) n_low++;
      end
    end
  end

  // compare one cycle after each sampling instant
  always @(negedge clk) begin
    if (rst_n && cyc % 400 == 1 && cyc > 1) begin
      checks++;
      if (int'(req_div) != m_div) begin
        failures++;
        $display("FAIL: sample %0d divisor %0d expected %0d", smp, req_div, m_div);
      end
    end
  end

  initial begin
    int c = 12;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      repeat (100 + $urandom % 300) @(posedge clk);
      #1;
      c = c + int'($urandom % 9) - 4;
      if ($urandom % 15 == 0) c = c + 15;
      if ($urandom % 15 == 0) c = c - 15;
      if (c < 0) c = 0;
      if (c > 40) c = 40;
      congestion = 8'(c);
    end
    checks += 3;
    if (spacing_bad != 0) begin failures++; $display("FAIL: changes closer than 1 us"); end
    if (n_high == 0 || n_low == 0 || n_norm == 0 || n_changes < 5) begin
      failures++;
      $display("FAIL: levels not all visited (%0d %0d %0d, %0d changes)", n_high, n_norm, n_low, n_changes);
    end
    if (n_held == 0) begin failures++; $display("FAIL: time limit never held a change back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
