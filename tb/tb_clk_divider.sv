// tb_clk_divider: self-checking test of the island clock divider.
//
// Measures every period of clk_out in master-clock cycles, and its high
// time, while the divisor request changes at random instants (also in the
// middle of a period). Each period must equal the divisor that was requested
// when the previous period ended (changes wait for the period boundary, so
// no short pulse appears), and the high time must be floor(div/2).
module tb_clk_divider;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [DIV_W-1:0] div_in = 6'd8, cur_div;
  logic clk_out, period_start;
  int checks = 0, failures = 0;

  clk_divider #(.DIV_W(DIV_W), .RESET_DIV(8)) dut (.*);

  always #5 clk = ~clk;

  // reference model: divisor latched at each period end
  int cyc = 0, last_rise = -1, hi_cnt = 0, exp_div = 8, next_div = 8, periods = 0;
  logic prev_out = 1'b0;
  always @(posedge clk) if (rst_n) cyc++;
  always @(negedge clk) begin
    if (rst_n) begin
      if (clk_out && !prev_out) begin
        if (last_rise >= 0) begin
          checks += 2;
          periods++;
          if (cyc - last_rise != exp_div) begin
            failures++;
            $display("FAIL: period %0d, expected %0d", cyc - last_rise, exp_div);
          end
          if (hi_cnt != exp_div / 2) begin
            failures++;
            $display("FAIL: high time %0d, expected %0d", hi_cnt, exp_div / 2);
          end
        end
        last_rise = cyc;
        hi_cnt = 0;
        exp_div = next_div;
      end
      if (clk_out) hi_cnt++;
      prev_out = clk_out;
    end
  end
  // the divisor requested at the edge where a new period starts is the one
  // that period uses
  always @(posedge clk) if (rst_n && period_start) next_div = (int'(div_in) < 2) ? 2 : int'(div_in);

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom % 25) @(posedge clk);
      #1 div_in = DIV_W'(2 + $urandom % 17);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (periods < 200) begin failures++; $display("FAIL: only %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
