// threshold_policy: three-level threshold frequency policy for one island.
//
// Every SAMPLE_CYCLES master cycles (0.1 us at the 4 GHz master clock) the
// congestion metric, the number of flits held in the island's input
// buffers, is sampled and compared with two thresholds:
//   congestion > HIGH_TH -> HIGH frequency (800 MHz, divisor 5)
//   congestion < LOW_TH  -> LOW frequency  (250 MHz, divisor 16)
//   otherwise            -> NORMAL frequency (500 MHz, divisor 8)
// A new level is applied only if at least LIMIT_SAMPLES sampling periods
// (the minimum time between frequency changes, 1 us) have passed since the
// last change; the period count starts at reset, when the island runs at
// NORMAL. Frequencies, thresholds, sampling period and change limit are the
// document's; its text names the thresholds in the opposite order to the
// way the policy uses them, and this design follows the policy (high
// congestion above 20 flits, low below 10). Strict comparisons are this
// design's own choice.
//
// Interface (master clock domain): congestion in; req_div (divisor request
// for dvs_ctrl), sample (pulse when a sample is taken) and changed (pulse
// when the level changes) out. Timing: req_div updates one cycle after the
// sampling instant.
module threshold_policy
  import noc_pkg::*;
#(
  parameter int unsigned CONG_W        = 8,
  parameter int unsigned SAMPLE_CYCLES = 400,
  parameter int unsigned LIMIT_SAMPLES = 10,
  parameter int unsigned HIGH_TH       = 20,
  parameter int unsigned LOW_TH        = 10,
  parameter int unsigned DIV_HIGH      = 5,
  parameter int unsigned DIV_NORMAL    = 8,
  parameter int unsigned DIV_LOW       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CONG_W-1:0] congestion,
  output logic [DIV_W-1:0]  req_div,
  output logic              sample,
  output logic              changed
);

  localparam int unsigned SMP_W = $clog2(SAMPLE_CYCLES);
  localparam int unsigned LIM_W = $clog2(LIMIT_SAMPLES + 1);

  logic [SMP_W-1:0] smp_cnt;
  logic [LIM_W-1:0] since;
  logic [DIV_W-1:0] want;

  assign sample = (smp_cnt == SMP_W'(SAMPLE_CYCLES - 1));

  always_comb begin
    if (32'(congestion) > HIGH_TH)     want = DIV_W'(DIV_HIGH);
    else if (32'(congestion) < LOW_TH) want = DIV_W'(DIV_LOW);
    else                               want = DIV_W'(DIV_NORMAL);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_cnt <= '0;
      since   <= '0;
      req_div <= DIV_W'(DIV_NORMAL);
      changed <= 1'b0;
    end else begin
      changed <= 1'b0;
      smp_cnt <= sample ? '0 : smp_cnt + 1'b1;
      if (sample) begin
        // samples since the last change, counting this one
        if (since != LIM_W'(LIMIT_SAMPLES)) since <= since + 1'b1;
        if ((since + 1'b1) >= LIM_W'(LIMIT_SAMPLES) && want != req_div) begin
          req_div <= want;
          since   <= '0;
          changed <= 1'b1;
        end
      end
    end
  end

endmodule
