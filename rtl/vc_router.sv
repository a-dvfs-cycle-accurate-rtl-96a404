// vc_router: 5-port wormhole virtual-channel mesh router, 4-stage pipeline.
//
// Ports: local, north, east, south, west (noc_pkg::port_e). Each input port
// has NUM_VC virtual-channel buffers of BUF_DEPTH flits. A head flit goes
// through the four stages the document describes, then the link:
//   BW/RC  the arriving flit is written into the VC buffer reserved for it
//          upstream; a head flit's output port is computed in the same
//          cycle with dimension-order XY routing (X first, then Y).
//   VA     a waiting head is given a free virtual channel of the next router
//          on its output port (one grant per output port per cycle, round
//          robin over the input VCs, lowest-numbered free VC).
//   SA     each input port nominates one of its active VCs that has a flit
//          and a downstream credit; each output port then grants one input
//          port (both round robin). A grant pops the flit and returns a
//          credit upstream.
//   ST     the winner, held in the ST register of its output port, crosses
//          the crossbar into the output register, which drives the link
//          (LT) with out_valid.
// Body and tail flits reuse the route and VC reserved by their head and go
// straight to SA. A tail releases its input VC when it leaves; the output VC
// is reusable once its tail has left and all its credits are back, so a new
// head never meets an old packet's state downstream.
//
// Flow control is credit based (the control link back to the sender); the
// credit channel and the output link each also have a ready signal so that a
// resynchronizer (handshake or FIFO) can sit on either, and credits waiting
// for the channel are counted per VC. congestion is the number of flits held
// in all input buffers, the metric the DVFS policies use.
//
// From the document: 4-stage wormhole pipeline (BW+RC, VA, SA, ST, then LT),
// 4 VCs, 64-bit link, XY routing, credit-style backward control link.
// This design's own choices: buffer depth, separable round-robin allocators,
// VC release rule, ready signals on both channels.
//
// Timing: a head flit written at edge t wins VA at edge t+1, SA at t+2,
// traverses the switch at t+3 and is on out_valid after edge t+3; body
// flits behind it follow one per cycle when nothing stalls.
module vc_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // flits in, one per port; always accepted (space guaranteed by credits)
  input  logic  [NUM_PORTS-1:0]  in_valid,
  input  flit_t [NUM_PORTS-1:0]  in_flit,
  // credits back to the upstream sender of each input port
  output logic  [NUM_PORTS-1:0]  cr_out_valid,
  output logic  [NUM_PORTS-1:0][VC_W-1:0] cr_out_vc,
  input  logic  [NUM_PORTS-1:0]  cr_out_ready,
  // flits out
  output logic  [NUM_PORTS-1:0]  out_valid,
  output flit_t [NUM_PORTS-1:0]  out_flit,
  input  logic  [NUM_PORTS-1:0]  out_ready,
  // credits from the downstream receiver of each output port
  input  logic  [NUM_PORTS-1:0]  cr_in_valid,
  input  logic  [NUM_PORTS-1:0][VC_W-1:0] cr_in_vc,
  // flits stored in the input buffers
  output logic [$clog2(NUM_PORTS*NUM_VC*BUF_DEPTH+1)-1:0] congestion
);

  localparam int unsigned NP    = NUM_PORTS;
  localparam int unsigned NV    = NUM_VC;
  localparam int unsigned NIVC  = NP * NV;
  localparam int unsigned PTR_W = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(BUF_DEPTH + 1);
  localparam int unsigned P_W   = 3;

  typedef enum logic [1:0] {VC_IDLE, VC_VA, VC_ACTIVE} vc_state_e;

  // ---------------- input VC state ----------------
  flit_t            buf_q   [NP][NV][BUF_DEPTH];
  logic [PTR_W-1:0] wr_ptr  [NP][NV];
  logic [PTR_W-1:0] rd_ptr  [NP][NV];
  logic [CNT_W-1:0] cnt     [NP][NV];
  vc_state_e        state   [NP][NV];
  logic [P_W-1:0]   route   [NP][NV];
  logic [VC_W-1:0]  ovc     [NP][NV];
  logic [CNT_W-1:0] cr_pend [NP][NV];   // credits owed upstream

  // ---------------- output VC state ----------------
  logic [CNT_W-1:0] credit    [NP][NV];
  logic             ovc_busy  [NP][NV];
  logic             ovc_tail  [NP][NV];  // tail sent, waiting for credits

  // XY route computation
  function automatic logic [P_W-1:0] xy_route(flit_t f);
    if (32'(f.dst_x) > MY_X) return P_W'(PORT_EAST);
    if (32'(f.dst_x) < MY_X) return P_W'(PORT_WEST);
    if (32'(f.dst_y) > MY_Y) return P_W'(PORT_SOUTH);
    if (32'(f.dst_y) < MY_Y) return P_W'(PORT_NORTH);
    return P_W'(PORT_LOCAL);
  endfunction

  // ---------------- VA: per output port, round robin over input VCs --------
  logic [$clog2(NIVC)-1:0] va_rr    [NP];
  logic                    va_gnt   [NP];
  logic [$clog2(NIVC)-1:0] va_win   [NP];
  logic [VC_W-1:0]         va_vc    [NP];

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      logic free_found;
      int   idx;
      va_gnt[o]  = 1'b0;
      va_win[o]  = '0;
      va_vc[o]   = '0;
      free_found = 1'b0;
      idx        = 0;
      for (int v = NV - 1; v >= 0; v--) begin
        if (!ovc_busy[o][v]) begin
          free_found = 1'b1;
          va_vc[o]   = VC_W'(v);
        end
      end
      if (free_found) begin
        for (int k = NIVC - 1; k >= 0; k--) begin
          idx = (int'(va_rr[o]) + k) % NIVC;
          if (state[idx / NV][idx % NV] == VC_VA &&
              int'(route[idx / NV][idx % NV]) == o) begin
            va_gnt[o] = 1'b1;
            va_win[o] = ($clog2(NIVC))'(idx);
          end
        end
      end
    end
  end

  // ---------------- SA: input stage then output stage --------------------
  logic [VC_W-1:0] sa_in_rr  [NP];
  logic            sa_in_req [NP];
  logic [VC_W-1:0] sa_in_vc  [NP];
  logic [P_W-1:0]  sa_out_rr [NP];
  logic            sa_gnt    [NP];   // per output port
  logic [P_W-1:0]  sa_src    [NP];   // winning input port per output port
  logic            in_won    [NP];   // per input port
  logic            out_free  [NP];
  logic            st_free   [NP];
  // ST stage: the switch-allocation winner of each output port
  logic            st_valid  [NP];
  flit_t           st_flit   [NP];

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_free[o] = !out_valid[o] || out_ready[o];
      st_free[o]  = !st_valid[o] || out_free[o];
    end
    for (int p = 0; p < NP; p++) begin
      int v;
      sa_in_req[p] = 1'b0;
      sa_in_vc[p]  = '0;
      v            = 0;
      for (int k = NV - 1; k >= 0; k--) begin
        v = (int'(sa_in_rr[p]) + k) % NV;
        if (state[p][v] == VC_ACTIVE && cnt[p][v] != '0 &&
            credit[route[p][v]][ovc[p][v]] != '0 && st_free[route[p][v]]) begin
          sa_in_req[p] = 1'b1;
          sa_in_vc[p]  = VC_W'(v);
        end
      end
    end
    for (int p = 0; p < NP; p++) in_won[p] = 1'b0;
    for (int o = 0; o < NP; o++) begin
      int p;
      sa_gnt[o] = 1'b0;
      sa_src[o] = '0;
      p         = 0;
      for (int k = NP - 1; k >= 0; k--) begin
        p = (int'(sa_out_rr[o]) + k) % NP;
        if (sa_in_req[p] && int'(route[p][sa_in_vc[p]]) == o) begin
          sa_gnt[o] = 1'b1;
          sa_src[o] = P_W'(p);
        end
      end
      if (sa_gnt[o]) in_won[sa_src[o]] = 1'b1;
    end
  end

  // credit return channel: lowest VC with a pending credit
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      cr_out_valid[p] = 1'b0;
      cr_out_vc[p]    = '0;
      for (int v = NV - 1; v >= 0; v--) begin
        if (cr_pend[p][v] != '0) begin
          cr_out_valid[p] = 1'b1;
          cr_out_vc[p]    = VC_W'(v);
        end
      end
    end
  end

  // ---------------- per-VC events of this cycle ----------------
  flit_t            head_flit  [NP][NV];   // oldest flit of each VC buffer
  logic             push       [NP][NV];
  logic             pop        [NP][NV];
  logic             cr_sent    [NP][NV];   // credit handed to the channel
  logic             tail_tak   [NP][NV];   // tail switched to output VC
  logic [CNT_W-1:0] credit_nxt [NP][NV];
  flit_t            sw_flit    [NP];       // flit crossing to each output

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      for (int v = 0; v < NV; v++) begin
        logic cr_ret, cr_tak;
        head_flit[p][v] = buf_q[p][v][rd_ptr[p][v]];
        push[p][v]    = in_valid[p] && in_flit[p].vc == VC_W'(v);
        pop[p][v]     = in_won[p] && sa_in_vc[p] == VC_W'(v);
        cr_sent[p][v] = cr_out_valid[p] && cr_out_ready[p] && cr_out_vc[p] == VC_W'(v);
        // credits of output port p, VC v
        cr_ret = cr_in_valid[p] && cr_in_vc[p] == VC_W'(v);
        cr_tak = sa_gnt[p] && ovc[sa_src[p]][sa_in_vc[sa_src[p]]] == VC_W'(v);
        tail_tak[p][v]   = cr_tak && is_tail(buf_q[sa_src[p]][sa_in_vc[sa_src[p]]]
                                                 [rd_ptr[sa_src[p]][sa_in_vc[sa_src[p]]]]);
        credit_nxt[p][v] = credit[p][v] + CNT_W'(cr_ret) - CNT_W'(cr_tak);
      end
    end
    for (int o = 0; o < NP; o++) begin
      sw_flit[o]    = head_flit[sa_src[o]][sa_in_vc[sa_src[o]]];
      sw_flit[o].vc = ovc[sa_src[o]][sa_in_vc[sa_src[o]]];
    end
  end

  // VC buffers: storage without reset, a slot is read only after a write
  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++)
        if (push[p][v]) buf_q[p][v][wr_ptr[p][v]] <= in_flit[p];
  end

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NV; v++) begin
          wr_ptr[p][v]   <= '0;
          rd_ptr[p][v]   <= '0;
          cnt[p][v]      <= '0;
          state[p][v]    <= VC_IDLE;
          route[p][v]    <= '0;
          ovc[p][v]      <= '0;
          cr_pend[p][v]  <= '0;
          credit[p][v]   <= CNT_W'(BUF_DEPTH);
          ovc_busy[p][v] <= 1'b0;
          ovc_tail[p][v] <= 1'b0;
        end
        va_rr[p]     <= '0;
        sa_in_rr[p]  <= '0;
        sa_out_rr[p] <= '0;
        out_valid[p] <= 1'b0;
        out_flit[p]  <= '0;
        st_valid[p]  <= 1'b0;
        st_flit[p]   <= '0;
      end
    end else begin
      // switch traversal: ST register into the output (link) register
      for (int o = 0; o < NP; o++) begin
        if (out_free[o]) begin
          out_valid[o] <= st_valid[o];
          out_flit[o]  <= st_flit[o];
          if (st_valid[o]) st_valid[o] <= 1'b0;
        end
      end

      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NV; v++) begin
          // buffer write (BW) and route computation (RC)
          if (push[p][v]) begin
            wr_ptr[p][v] <= (wr_ptr[p][v] == PTR_W'(BUF_DEPTH - 1)) ? '0 : wr_ptr[p][v] + 1'b1;
            if (is_head(in_flit[p])) begin
              state[p][v] <= VC_VA;
              route[p][v] <= xy_route(in_flit[p]);
            end
          end
          if (pop[p][v]) begin
            rd_ptr[p][v] <= (rd_ptr[p][v] == PTR_W'(BUF_DEPTH - 1)) ? '0 : rd_ptr[p][v] + 1'b1;
            if (is_tail(head_flit[p][v])) state[p][v] <= VC_IDLE;
          end
          cnt[p][v]     <= cnt[p][v] + CNT_W'(push[p][v]) - CNT_W'(pop[p][v]);
          cr_pend[p][v] <= cr_pend[p][v] + CNT_W'(pop[p][v]) - CNT_W'(cr_sent[p][v]);
          credit[p][v]  <= credit_nxt[p][v];
          if (tail_tak[p][v]) ovc_tail[p][v] <= 1'b1;
          if ((ovc_tail[p][v] || tail_tak[p][v]) && credit_nxt[p][v] == CNT_W'(BUF_DEPTH)) begin
            ovc_busy[p][v] <= 1'b0;
            ovc_tail[p][v] <= 1'b0;
          end
        end
      end

      // VA grants
      for (int o = 0; o < NP; o++) begin
        if (va_gnt[o]) begin
          state[int'(va_win[o]) / NV][int'(va_win[o]) % NV] <= VC_ACTIVE;
          ovc[int'(va_win[o]) / NV][int'(va_win[o]) % NV]   <= va_vc[o];
          ovc_busy[o][va_vc[o]]                 <= 1'b1;
          va_rr[o] <= (va_win[o] == ($clog2(NIVC))'(NIVC - 1)) ? '0 : va_win[o] + 1'b1;
        end
      end

      // SA grants into the ST registers
      for (int p = 0; p < NP; p++)
        if (in_won[p])
          sa_in_rr[p] <= (sa_in_vc[p] == VC_W'(NV - 1)) ? '0 : sa_in_vc[p] + 1'b1;
      for (int o = 0; o < NP; o++) begin
        if (sa_gnt[o]) begin
          st_flit[o]   <= sw_flit[o];
          st_valid[o]  <= 1'b1;
          sa_out_rr[o] <= (sa_src[o] == P_W'(NP - 1)) ? '0 : sa_src[o] + 1'b1;
        end
      end
    end
  end

  // congestion: flits held in all input buffers
  always_comb begin
    congestion = '0;
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++)
        congestion = congestion + $bits(congestion)'(cnt[p][v]);
  end

  // ---------------- protocol checks ----------------
  for (genvar gp = 0; gp < NP; gp++) begin : g_chk
    // a flit never arrives for a full VC buffer (credit protocol)
    a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[gp] |-> cnt[gp][in_flit[gp].vc] != CNT_W'(BUF_DEPTH));
    // a head only arrives on an idle input VC
    a_head_idle : assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid[gp] && is_head(in_flit[gp])) |-> state[gp][in_flit[gp].vc] == VC_IDLE);
  end

endmodule
