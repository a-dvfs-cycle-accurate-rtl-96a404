// local_ni: injection side of a router's local port.
//
// Flits from the attached core or cache arrive, already resynchronized into
// the router's clock, on a valid/ready channel. local_ni forwards a flit to
// the router's local input only when the router has buffer space for it:
// it keeps one credit counter per virtual channel, decremented on every
// flit sent and incremented by the credits the router returns. A head flit
// additionally waits until its VC's credits are all back, so a packet only
// starts on a VC whose previous packet has left the router's buffer (the
// same rule the routers use for their output VCs). The virtual channel is
// chosen by the sender in the flit's vc field. The document does not
// describe the network interface; this block is this design's own.
//
// Interface (router clock domain): in_valid/in_ready/in_flit from the
// resynchronizer, out_valid/out_flit to the router (no back-pressure),
// cr_valid/cr_vc credits from the router. Timing: combinational forward
// path, credits take effect the cycle after they arrive.
module local_ni
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  flit_t           in_flit,
  output logic            out_valid,
  output flit_t           out_flit,
  input  logic            cr_valid,
  input  logic [VC_W-1:0] cr_vc
);

  localparam int unsigned CNT_W = $clog2(BUF_DEPTH + 1);

  logic [CNT_W-1:0] credit [NUM_VC];
  logic [CNT_W-1:0] cur;

  assign cur       = credit[in_flit.vc];
  assign in_ready  = is_head(in_flit) ? (cur == CNT_W'(BUF_DEPTH)) : (cur != '0);
  assign out_valid = in_valid && in_ready;
  assign out_flit  = in_flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) credit[v] <= CNT_W'(BUF_DEPTH);
    end else begin
      for (int v = 0; v < NUM_VC; v++)
        credit[v] <= credit[v]
                   + CNT_W'(cr_valid && cr_vc == VC_W'(v))
                   - CNT_W'(out_valid && in_flit.vc == VC_W'(v));
    end
  end

endmodule
