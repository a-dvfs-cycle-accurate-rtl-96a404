// clk_divider: island clock derived from the single chip PLL clock.
//
// One of the two frequency-scaling schemes the document describes: a single
// PLL for the whole chip and a frequency divider per island. The output
// clock has a period of div master-clock cycles, high for the first
// floor(div/2) of them. A new divisor requested on div_in is taken only when
// the current period ends, so a change never produces a short pulse: the
// document asks that changes not aligned to a clock boundary wait for the
// next one to avoid glitches. The register-based divider and the duty cycle
// are this design's own choices.
//
// Interface: clk (master), div_in (values below 2 are treated as 2).
// clk_out is a flip-flop output; period_start pulses in the master domain
// in the cycle whose edge makes clk_out rise. cur_div is the divisor of the
// period now running. Timing: a divisor change takes effect at the first
// rising edge of clk_out after the current period completes.
module clk_divider #(
  parameter int unsigned DIV_W     = 6,
  parameter int unsigned RESET_DIV = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_in,
  output logic             clk_out,
  output logic             period_start,
  output logic [DIV_W-1:0] cur_div
);

  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] cnt_n, div_n, div_safe;
  logic             wrap;

  assign div_safe = (div_in < DIV_W'(2)) ? DIV_W'(2) : div_in;
  assign wrap     = (cnt == cur_div - 1'b1);

  always_comb begin
    if (wrap) begin
      cnt_n = '0;
      div_n = div_safe;
    end else begin
      cnt_n = cnt + 1'b1;
      div_n = cur_div;
    end
  end

  assign period_start = wrap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= DIV_W'(RESET_DIV - 1);
      cur_div <= DIV_W'(RESET_DIV);
      clk_out <= 1'b0;
    end else begin
      cnt     <= cnt_n;
      cur_div <= div_n;
      clk_out <= (cnt_n < (div_n >> 1));
    end
  end

endmodule
