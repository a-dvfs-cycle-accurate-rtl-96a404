// dvfs_noc_top: 4x4 mesh NoC split into voltage/frequency islands, with
// resynchronizers between islands and per-island DVFS control.
//
// Structure:
//   * 16 vc_router instances in a 4x4 mesh (router r at column r%4, row
//     r/4). Each router belongs to an island: with VFI_2X2 = 0 every
//     router is its own island (16 islands), with VFI_2X2 = 1 the mesh is
//     cut into four 2x2 quadrants.
//   * Every island has its own clock, made by a clk_divider from the single
//     chip PLL clock clk_pll. A link between routers of different islands
//     carries a resynchronizer (RESYNC: FIFO of FIFO_DEPTH slots or
//     handshake) on both its flit channel and its credit channel; a link
//     inside an island is a plain wire.
//   * The local port of each router connects to its core/cache tile, which
//     runs on clk_core and is not part of any island: injection and
//     ejection each pass a FIFO resynchronizer (always a FIFO, since the
//     injection side must be able to stall), and local_ni applies the
//     router's credits to injected flits. Ejected flits must be accepted.
//   * Each router's buffer occupancy crosses into the clk_pll domain
//     through an hs_resync; each island averages the occupancy of its
//     routers and feeds it to a threshold_policy and a linear_policy.
//     policy_sel picks one of them or the fixed divisor fixed_div; the
//     divisor request goes through dvs_ctrl, which raises the voltage before
//     a frequency increase when dvs_en is set (DVFS) or keeps 1.0 V
//     (frequency scaling only).
// From the document: mesh size, router, islands with resynchronizers at
// their borders and towards the tiles, per-island DFS/DVFS with a policy,
// 6-slot FIFO resynchronizer, single PLL plus dividers. This design's own
// choices: one local port per router shared by core and cache, the network
// interface, how occupancy reaches the policy (a handshake channel), and
// a common asynchronous reset for all domains.
//
// Interface: clk_pll (master, 4 GHz nominal), clk_core, rst_n; per router
// inj_* (valid/ready, core domain), ej_* (valid only, core domain), and
// the divisor, voltage code and congestion of each router's island.
module dvfs_noc_top
  import noc_pkg::*;
#(
  parameter bit          VFI_2X2        = 1'b0,
  parameter resync_e     RESYNC         = RESYNC_FIFO,
  parameter int unsigned FIFO_DEPTH     = 6,
  parameter int unsigned BUF_DEPTH      = 4,
  parameter int unsigned V_DELAY_CYCLES = 20000,
  parameter int unsigned SAMPLE_CYCLES  = 400,
  parameter int unsigned LIMIT_SAMPLES  = 10
) (
  input  logic                                clk_pll,
  input  logic                                clk_core,
  input  logic                                rst_n,
  input  policy_e                             policy_sel,
  input  logic                                dvs_en,
  input  logic [DIV_W-1:0]                    fixed_div,
  input  logic  [NUM_ROUTERS-1:0]             inj_valid,
  output logic  [NUM_ROUTERS-1:0]             inj_ready,
  input  flit_t [NUM_ROUTERS-1:0]             inj_flit,
  output logic  [NUM_ROUTERS-1:0]             ej_valid,
  output flit_t [NUM_ROUTERS-1:0]             ej_flit,
  output logic  [NUM_ROUTERS-1:0][DIV_W-1:0]  router_div,
  output vid_e  [NUM_ROUTERS-1:0]             router_vid,
  output logic  [NUM_ROUTERS-1:0][7:0]        router_cong
);

  localparam int unsigned NR      = NUM_ROUTERS;
  localparam int unsigned NP      = NUM_PORTS;
  localparam int unsigned NISL    = VFI_2X2 ? 4 : NR;
  localparam int unsigned ISL_SZ  = NR / NISL;
  localparam int unsigned CONG_RW = $clog2(NP * NUM_VC * BUF_DEPTH + 1);

  function automatic int isl_of(int r);
    if (VFI_2X2) return ((r / MESH_X) / 2) * 2 + (r % MESH_X) / 2;
    return r;
  endfunction

  // neighbour of router r through port p, -1 at the mesh edge
  function automatic int nbr(int r, int p);
    int x, y;
    x = r % MESH_X;
    y = r / MESH_X;
    case (p)
      1: return (y > 0)          ? r - MESH_X : -1;  // north
      2: return (x < MESH_X - 1) ? r + 1      : -1;  // east
      3: return (y < MESH_Y - 1) ? r + MESH_X : -1;  // south
      4: return (x > 0)          ? r - 1      : -1;  // west
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    case (p)
      1: return 3;
      2: return 4;
      3: return 1;
      4: return 2;
      default: return 0;
    endcase
  endfunction

  // ---------------- island clocks and DVFS (clk_pll domain) ----------------
  logic [NISL-1:0]            isl_clk;
  logic [NISL-1:0][DIV_W-1:0] isl_div;
  vid_e [NISL-1:0]            isl_vid;
  logic [NISL-1:0][7:0]       isl_cong;
  logic [NR-1:0]              rclk;
  logic [NR-1:0][7:0]         cong_pll;   // per-router occupancy, clk_pll domain

  for (genvar i = 0; i < NISL; i++) begin : g_isl
    logic [11:0]      sum;
    logic [DIV_W-1:0] thr_div, lin_div, req_div;
    logic             thr_smp, thr_chg, lin_smp, ramping, pstart;
    logic [DIV_W-1:0] cur_div;

    always_comb begin
      sum = '0;
      for (int r = 0; r < NR; r++)
        if (isl_of(r) == i) sum = sum + 12'(cong_pll[r]);
    end
    assign isl_cong[i] = 8'(sum / 12'(ISL_SZ));

    threshold_policy #(
      .CONG_W(8), .SAMPLE_CYCLES(SAMPLE_CYCLES), .LIMIT_SAMPLES(LIMIT_SAMPLES)
    ) u_thr (
      .clk(clk_pll), .rst_n, .congestion(isl_cong[i]),
      .req_div(thr_div), .sample(thr_smp), .changed(thr_chg)
    );

    linear_policy #(.CONG_W(8), .SAMPLE_CYCLES(SAMPLE_CYCLES)) u_lin (
      .clk(clk_pll), .rst_n, .congestion(isl_cong[i]),
      .req_div(lin_div), .sample(lin_smp)
    );

    always_comb begin
      case (policy_sel)
        POLICY_THRESHOLD: req_div = thr_div;
        POLICY_LINEAR:    req_div = lin_div;
        default:          req_div = fixed_div;
      endcase
    end

    dvs_ctrl #(.V_DELAY_CYCLES(V_DELAY_CYCLES)) u_dvs (
      .clk(clk_pll), .rst_n, .req_div, .dvs_en,
      .div_out(isl_div[i]), .vid_out(isl_vid[i]), .ramping
    );

    clk_divider #(.DIV_W(DIV_W)) u_div (
      .clk(clk_pll), .rst_n, .div_in(isl_div[i]),
      .clk_out(isl_clk[i]), .period_start(pstart), .cur_div
    );
  end

  // ---------------- routers ----------------
  logic  [NR-1:0][NP-1:0]           r_in_valid;
  flit_t [NR-1:0][NP-1:0]           r_in_flit;
  logic  [NR-1:0][NP-1:0]           r_cro_valid, r_cro_ready;
  logic  [NR-1:0][NP-1:0][VC_W-1:0] r_cro_vc;
  logic  [NR-1:0][NP-1:0]           r_out_valid, r_out_ready;
  flit_t [NR-1:0][NP-1:0]           r_out_flit;
  logic  [NR-1:0][NP-1:0]           r_cri_valid;
  logic  [NR-1:0][NP-1:0][VC_W-1:0] r_cri_vc;

  for (genvar r = 0; r < NR; r++) begin : g_rtr
    logic [CONG_RW-1:0] cong;
    logic               cs_ready, cs_valid;
    logic [7:0]         cs_data;

    assign rclk[r]       = isl_clk[isl_of(r)];
    assign router_div[r] = isl_div[isl_of(r)];
    assign router_vid[r] = isl_vid[isl_of(r)];
    assign router_cong[r] = cong_pll[r];

    vc_router #(.MY_X(r % MESH_X), .MY_Y(r / MESH_X), .BUF_DEPTH(BUF_DEPTH)) u_rtr (
      .clk(rclk[r]), .rst_n,
      .in_valid(r_in_valid[r]), .in_flit(r_in_flit[r]),
      .cr_out_valid(r_cro_valid[r]), .cr_out_vc(r_cro_vc[r]), .cr_out_ready(r_cro_ready[r]),
      .out_valid(r_out_valid[r]), .out_flit(r_out_flit[r]), .out_ready(r_out_ready[r]),
      .cr_in_valid(r_cri_valid[r]), .cr_in_vc(r_cri_vc[r]),
      .congestion(cong)
    );

    // occupancy towards the policy, resent whenever the channel is free
    hs_resync #(.WIDTH(8)) u_cong (
      .tx_clk(rclk[r]), .tx_rst_n(rst_n), .tx_valid(1'b1), .tx_ready(cs_ready),
      .tx_data(8'(cong)),
      .rx_clk(clk_pll), .rx_rst_n(rst_n), .rx_valid(cs_valid), .rx_data(cs_data)
    );
    always_ff @(posedge clk_pll or negedge rst_n) begin
      if (!rst_n)        cong_pll[r] <= '0;
      else if (cs_valid) cong_pll[r] <= cs_data;
    end

    // ---- local port: core domain <-> router domain ----
    logic  ni_valid, ni_ready;
    flit_t ni_flit;
    logic  ej_tx_ready;

    link_resync #(.WIDTH(FLIT_W), .KIND(RESYNC_FIFO), .FIFO_DEPTH(FIFO_DEPTH)) u_inj (
      .tx_clk(clk_core), .tx_rst_n(rst_n), .tx_valid(inj_valid[r]),
      .tx_ready(inj_ready[r]), .tx_data(inj_flit[r]),
      .rx_clk(rclk[r]), .rx_rst_n(rst_n), .rx_valid(ni_valid),
      .rx_ready(ni_ready), .rx_data(ni_flit)
    );

    local_ni #(.BUF_DEPTH(BUF_DEPTH)) u_ni (
      .clk(rclk[r]), .rst_n,
      .in_valid(ni_valid), .in_ready(ni_ready), .in_flit(ni_flit),
      .out_valid(r_in_valid[r][PORT_LOCAL]), .out_flit(r_in_flit[r][PORT_LOCAL]),
      .cr_valid(r_cro_valid[r][PORT_LOCAL]), .cr_vc(r_cro_vc[r][PORT_LOCAL])
    );
    assign r_cro_ready[r][PORT_LOCAL] = 1'b1;

    link_resync #(.WIDTH(FLIT_W), .KIND(RESYNC_FIFO), .FIFO_DEPTH(FIFO_DEPTH)) u_ej (
      .tx_clk(rclk[r]), .tx_rst_n(rst_n), .tx_valid(r_out_valid[r][PORT_LOCAL]),
      .tx_ready(ej_tx_ready), .tx_data(r_out_flit[r][PORT_LOCAL]),
      .rx_clk(clk_core), .rx_rst_n(rst_n), .rx_valid(ej_valid[r]),
      .rx_ready(1'b1), .rx_data(ej_flit[r])
    );
    assign r_out_ready[r][PORT_LOCAL] = ej_tx_ready;
    // the ejection buffer is the local output's downstream: its credit
    // comes back as soon as the flit has left the router
    assign r_cri_valid[r][PORT_LOCAL] = r_out_valid[r][PORT_LOCAL] && ej_tx_ready;
    assign r_cri_vc[r][PORT_LOCAL]    = r_out_flit[r][PORT_LOCAL].vc;

    // ---- mesh ports: each router drives the links leaving it ----
    for (genvar p = 1; p < NP; p++) begin : g_port
      localparam int N  = nbr(r, p);
      localparam int OP = opp(p);
      if (N < 0) begin : g_edge
        assign r_in_valid[r][p]  = 1'b0;
        assign r_in_flit[r][p]   = '0;
        assign r_cri_valid[r][p] = 1'b0;
        assign r_cri_vc[r][p]    = '0;
        assign r_out_ready[r][p] = 1'b0;
        assign r_cro_ready[r][p] = 1'b1;
      end else begin : g_link
        localparam resync_e K = (isl_of(r) == isl_of(N)) ? RESYNC_NONE : RESYNC;
        // flits from r's output p to N's input OP
        link_resync #(.WIDTH(FLIT_W), .KIND(K), .FIFO_DEPTH(FIFO_DEPTH)) u_flit (
          .tx_clk(rclk[r]), .tx_rst_n(rst_n), .tx_valid(r_out_valid[r][p]),
          .tx_ready(r_out_ready[r][p]), .tx_data(r_out_flit[r][p]),
          .rx_clk(rclk[N]), .rx_rst_n(rst_n), .rx_valid(r_in_valid[N][OP]),
          .rx_ready(1'b1), .rx_data(r_in_flit[N][OP])
        );
        // credits for r's input p go to N's output OP
        link_resync #(.WIDTH(VC_W), .KIND(K), .FIFO_DEPTH(FIFO_DEPTH)) u_cred (
          .tx_clk(rclk[r]), .tx_rst_n(rst_n), .tx_valid(r_cro_valid[r][p]),
          .tx_ready(r_cro_ready[r][p]), .tx_data(r_cro_vc[r][p]),
          .rx_clk(rclk[N]), .rx_rst_n(rst_n), .rx_valid(r_cri_valid[N][OP]),
          .rx_ready(1'b1), .rx_data(r_cri_vc[N][OP])
        );
      end
    end
  end

endmodule
