// linear_policy: proportional frequency policy f = k * C for one island.
//
// Every SAMPLE_CYCLES master cycles (10 MHz sampling at the 4 GHz master
// clock) the island's congestion C (flits in its input buffers, averaged
// over its routers) is turned into a frequency request f = k * C with
// k = 0.04 GHz per flit (K_MHZ_PER_FLIT = 40). The document gives the law,
// the constant and the sampling rate. This design's own choices: the
// request is clamped to F_MIN_MHZ..F_MAX_MHZ (250 MHz to 1 GHz, the range
// covered by the voltage table) and rounded to the slowest divider setting
// that still reaches it, i.e. the largest divisor d in
// [CLK_MASTER/F_MAX, CLK_MASTER/F_MIN] with d * f <= CLK_MASTER.
//
// Interface (master clock domain): congestion in; req_div and sample out.
// Timing: req_div updates one cycle after the sampling instant.
module linear_policy
  import noc_pkg::*;
#(
  parameter int unsigned CONG_W         = 8,
  parameter int unsigned SAMPLE_CYCLES  = 400,
  parameter int unsigned K_MHZ_PER_FLIT = 40,
  parameter int unsigned F_MIN_MHZ      = 250,
  parameter int unsigned F_MAX_MHZ      = 1000,
  parameter int unsigned MASTER_MHZ     = CLK_MASTER_MHZ,
  parameter int unsigned RESET_DIV      = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CONG_W-1:0] congestion,
  output logic [DIV_W-1:0]  req_div,
  output logic              sample
);

  localparam int unsigned SMP_W   = $clog2(SAMPLE_CYCLES);
  localparam int unsigned DIV_MIN = MASTER_MHZ / F_MAX_MHZ;
  localparam int unsigned DIV_MAX = MASTER_MHZ / F_MIN_MHZ;

  logic [SMP_W-1:0] smp_cnt;
  logic [31:0]      f_req;
  logic [DIV_W-1:0] div_sel;

  assign sample = (smp_cnt == SMP_W'(SAMPLE_CYCLES - 1));

  always_comb begin
    f_req = 32'(congestion) * K_MHZ_PER_FLIT;
    if (f_req < F_MIN_MHZ) f_req = F_MIN_MHZ;
    if (f_req > F_MAX_MHZ) f_req = F_MAX_MHZ;
    div_sel = DIV_W'(DIV_MIN);
    for (int d = DIV_MIN; d <= DIV_MAX; d++)
      if (32'(d) * f_req <= MASTER_MHZ) div_sel = DIV_W'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_cnt <= '0;
      req_div <= DIV_W'(RESET_DIV);
    end else begin
      smp_cnt <= sample ? '0 : smp_cnt + 1'b1;
      if (sample) req_div <= div_sel;
    end
  end

endmodule
