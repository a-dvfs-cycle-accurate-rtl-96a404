// tb_dvs_ctrl: self-checking test of the voltage/frequency sequencer at its
// default parameters (4 GHz master clock, 5 us = 20000-cycle voltage rise).
//
// Checks: the voltage chosen for each frequency against the four-level
// table (worked out here from f = 4000 MHz / div); that decreases apply one
// cycle after the request with the voltage lowered at the same time; that an
// increase needing more voltage raises the voltage at once and changes the
// frequency only 20001 cycles later; that frequency-only mode keeps 1.0 V
// and applies every change at once; and, every cycle, that the applied
// frequency never exceeds what the present voltage supports.
module tb_dvs_ctrl;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [DIV_W-1:0] req_div = 6'd8, div_out;
  logic dvs_en = 1'b1, ramping;
  vid_e vid_out;
  int checks = 0, failures = 0;

  dvs_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (div=%0d vid=%0d)", m, div_out, vid_out); end
  endtask

  // highest frequency in MHz each voltage code supports
  function automatic int fmax(vid_e v);
    case (v)
      VID_0V7: return 250;
      VID_0V8: return 500;
      VID_0V9: return 750;
      default: return 100000;
    endcase
  endfunction
  function automatic vid_e expect_vid(int d);
    int f = 4000 / d;   // exact for the divisors used below
    if (f <= 250) return VID_0V7;
    if (f <= 500) return VID_0V8;
    if (f <= 750) return VID_0V9;
    return VID_1V0;
  endfunction

  int unsafe = 0;
  always @(negedge clk) if (rst_n && dvs_en && 4000 / int'(div_out) > fmax(vid_out)) unsafe++;

  task automatic request(input int d);
    @(negedge clk);
    req_div = DIV_W'(d);
    @(negedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(div_out == 8 && vid_out == VID_0V8, "reset: 500 MHz at 0.8 V");
    // decreases: immediate, voltage follows the table
    request(10);
    check(div_out == 10 && vid_out == expect_vid(10), "decrease to 400 MHz immediate");
    request(16);
    check(div_out == 16 && vid_out == expect_vid(16), "decrease to 250 MHz immediate, 0.7 V");
    request(20);
    check(div_out == 20 && vid_out == VID_0V7, "decrease to 200 MHz");
    // increase needing a higher voltage: voltage first, frequency 20001 cycles later
    request(5);
    check(vid_out == VID_1V0 && div_out == 20 && ramping, "voltage raised first, frequency held");
    n = 0;
    while (div_out != 5 && n < 30000) begin @(negedge clk); n++; end
    check(n == 20001, $sformatf("frequency raised %0d cycles after the voltage, expected 20001", n));
    // increase inside the same voltage level: immediate
    request(20);
    check(div_out == 20 && vid_out == VID_0V7, "back to 200 MHz");
    request(16);
    check(div_out == 16 && !ramping, "200 -> 250 MHz needs no new voltage");
    // a request that changes during the ramp
    request(8);
    check(ramping && vid_out == VID_0V8, "ramp to 0.8 V");
    repeat (100) @(negedge clk);
    req_div = 6'd4;
    n = 0;
    while (div_out != 4 && n < 50000) begin @(negedge clk); n++; end
    check(div_out == 4 && vid_out == VID_1V0, "changed request reaches 1 GHz at 1.0 V");
    // table sweep downwards
    foreach (sweep[i]) begin
      request(sweep[i]);
      check(div_out == DIV_W'(sweep[i]) && vid_out == expect_vid(sweep[i]),
            $sformatf("voltage for divisor %0d", sweep[i]));
    end
    // frequency scaling only: after the supply has settled at 1.0 V,
    // every change is immediate
    dvs_en = 1'b0;
    n = 0;
    @(negedge clk);
    while ((vid_out != VID_1V0 || ramping) && n < 30000) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
    request(4);
    check(div_out == 4 && vid_out == VID_1V0, "DFS only: 1 GHz at once");
    request(16);
    check(div_out == 16 && vid_out == VID_1V0, "DFS only: voltage stays 1.0 V");
    request(5);
    check(div_out == 5 && vid_out == VID_1V0 && !ramping, "DFS only: increase at once");
    check(unsafe == 0, $sformatf("frequency above voltage limit in %0d cycles", unsafe));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int sweep[7] = '{4, 5, 6, 7, 8, 12, 16};

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
