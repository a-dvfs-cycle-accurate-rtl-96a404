// tb_linear_policy: self-checking test of the proportional policy f = k * C
// at its default parameters (k = 40 MHz per flit, sampling every 400 master
// cycles = 10 MHz, 250 MHz .. 1 GHz, 4 GHz master clock).
//
// Congestion takes random values between 0 and 80 flits (all the buffer
// space of a router). After every sample the divisor must equal the
// independently computed floor(4000 / clamp(40 * C, 250, 1000)), i.e. the
// slowest divided clock that is still at least the requested frequency.
module tb_linear_policy;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] congestion = '0;
  logic [DIV_W-1:0] req_div;
  logic sample;
  int checks = 0, failures = 0;

  linear_policy dut (.*);

  always #5 clk = ~clk;

  int cyc = 0, m_div = 8, n_min = 0, n_max = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (cyc % 400 == 0) begin
        int f;
        f = 40 * int'(congestion);
        if (f < 250) f = 250;
        if (f > 1000) f = 1000;
        m_div = 4000 / f;
        if (m_div == 16) n_min++;
        if (m_div == 4) n_max++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && cyc % 400 == 1 && cyc > 1) begin
      checks++;
      if (int'(req_div) != m_div) begin
        failures++;
        $display("FAIL: C=%0d divisor %0d expected %0d", congestion, req_div, m_div);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      repeat (400) @(posedge clk);
      #1 congestion = 8'($urandom % 81);
    end
    repeat (400) @(posedge clk);
    checks++;
    if (n_min == 0 || n_max == 0) begin failures++; $display("FAIL: clamps not exercised"); end
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
