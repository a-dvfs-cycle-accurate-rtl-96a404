// dvs_ctrl: voltage scaling as a slave of frequency scaling, for one island.
//
// Takes the clock divisor asked for by the policy and drives the divisor
// actually applied and the voltage code sent to the island's regulator. It
// follows the rules the document gives for its DVS model:
//   * the voltage is the lowest of four levels that supports the frequency
//     (f <= 250 MHz: 0.7 V, <= 500 MHz: 0.8 V, <= 750 MHz: 0.9 V, above:
//     1.0 V);
//   * a frequency decrease is applied at once and the voltage is lowered in
//     parallel;
//   * a frequency increase that needs a higher voltage first commands the
//     new voltage, waits V_DELAY_CYCLES master cycles (5 us for the
//     regulator's voltage increase) and only then applies the frequency.
// With dvs_en low the island runs frequency scaling only at the nominal
// 1.0 V and every change is immediate. A request that changes during a
// voltage ramp is re-evaluated when the ramp ends. The frequency of a divisor
// is CLK_MASTER_MHZ / div; the comparison is done as div * f_level >=
// CLK_MASTER_MHZ, so no divider is needed.
//
// Interface (master clock domain): req_div, dvs_en in; div_out, vid_out
// (regulator command), ramping out. Timing: decreases apply one cycle after
// the request; voltage-limited increases after V_DELAY_CYCLES + 1 cycles.
module dvs_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned MASTER_MHZ     = CLK_MASTER_MHZ,
  parameter int unsigned V_DELAY_CYCLES = 20000,
  parameter int unsigned RESET_DIV      = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] req_div,
  input  logic             dvs_en,
  output logic [DIV_W-1:0] div_out,
  output vid_e             vid_out,
  output logic             ramping
);

  localparam int unsigned TMR_W = $clog2(V_DELAY_CYCLES + 1);

  function automatic vid_e vid_for(logic [DIV_W-1:0] d);
    if (32'(d) * 250 >= MASTER_MHZ) return VID_0V7;
    if (32'(d) * 500 >= MASTER_MHZ) return VID_0V8;
    if (32'(d) * 750 >= MASTER_MHZ) return VID_0V9;
    return VID_1V0;
  endfunction

  vid_e             need_vid;
  logic [TMR_W-1:0] tmr;

  assign need_vid = dvs_en ? vid_for(req_div) : VID_1V0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_out <= DIV_W'(RESET_DIV);
      vid_out <= vid_for(DIV_W'(RESET_DIV));
      ramping <= 1'b0;
      tmr     <= '0;
    end else if (ramping) begin
      if (tmr == '0) begin
        ramping <= 1'b0;          // voltage is stable: re-evaluate next cycle
      end else begin
        tmr <= tmr - 1'b1;
      end
    end else if (req_div != div_out || need_vid != vid_out) begin
      if (need_vid > vid_out) begin
        vid_out <= need_vid;      // raise the voltage first
        ramping <= 1'b1;
        tmr     <= TMR_W'(V_DELAY_CYCLES - 1);
      end else begin
        div_out <= req_div;       // frequency now, voltage down in parallel
        vid_out <= need_vid;
      end
    end
  end

  // The applied frequency never exceeds what the supplied voltage allows.
  a_safe_voltage : assert property (@(posedge clk) disable iff (!rst_n)
    !dvs_en || vid_out >= vid_for(div_out));

endmodule
