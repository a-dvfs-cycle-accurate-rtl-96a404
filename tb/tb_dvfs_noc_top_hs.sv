// tb_dvfs_noc_top_hs: end-to-end test of the NoC with four 2x2 islands and
// handshake resynchronizers on the links between islands.
//
// Same traffic, phases and packet checks as the default-configuration test
// (light load, hot-spot bursts under the threshold policy with voltage
// scaling, linear policy, fixed 1 GHz). In addition it checks that the four
// routers of a quadrant always share one divisor and voltage (the policy
// acts on their averaged occupancy), and counts cycles in which a router
// holds a flit because the handshake of an inter-island link is still busy,
// and transfers on links inside an island, which need no resynchronizer.
module tb_dvfs_noc_top_hs;
  import noc_pkg::*;
  localparam int NR = NUM_ROUTERS;

  logic clk_pll = 1'b0, clk_core = 1'b0, rst_n = 1'b1;
  policy_e policy_sel = POLICY_THRESHOLD;
  logic dvs_en = 1'b1;
  logic [DIV_W-1:0] fixed_div = 6'd4;
  logic  [NR-1:0] inj_valid = '0, inj_ready, ej_valid;
  flit_t [NR-1:0] inj_flit = '0, ej_flit;
  logic  [NR-1:0][DIV_W-1:0] router_div;
  vid_e  [NR-1:0] router_vid;
  logic  [NR-1:0][7:0] router_cong;

  dvfs_noc_top #(.VFI_2X2(1'b1), .RESYNC(RESYNC_HANDSHAKE)) dut (.*);

  // 1 time unit = 125 ps: clk_pll 4 GHz, clk_core 2 GHz
  always #1 clk_pll = ~clk_pll;
  always #2 clk_core = ~clk_core;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // ---------------- traffic sources (clk_core domain) ----------------
  bit started = 1'b0;
  int rate = 5;          // percent chance per cycle to start a packet
  int hot = -1;          // hot-spot destination, -1 for uniform
  bit stop_inj = 1'b0;
  int sent = 0, rcvd = 0;
  bit pending [int];
  int inj_full = 0;

  typedef struct { bit act; int dst, len, idx, seq; } src_t;
  src_t src [NR];

  function automatic flit_t mkf(int s, src_t p);
    flit_t f;
    f.data  = {8'(s), 8'(p.dst), 16'(p.seq), 8'(p.idx), 8'(p.len), 16'hbeef};
    f.vc    = VC_W'(p.seq % NUM_VC);
    f.dst_x = COORD_W'(p.dst % MESH_X);
    f.dst_y = COORD_W'(p.dst / MESH_X);
    if (p.len == 1)            f.ftype = FLIT_HEADTAIL;
    else if (p.idx == 0)       f.ftype = FLIT_HEAD;
    else if (p.idx == p.len-1) f.ftype = FLIT_TAIL;
    else                       f.ftype = FLIT_BODY;
    return f;
  endfunction

  always @(posedge clk_core) begin
    if (rst_n && started) begin
      for (int s = 0; s < NR; s++) begin
        if (inj_valid[s] && !inj_ready[s]) inj_full++;
        if (inj_valid[s] && inj_ready[s]) begin
          src[s].idx++;
          if (src[s].idx == src[s].len) begin
            src[s].act = 1'b0;
            sent++;
          end
        end
      end
      #1;
      for (int s = 0; s < NR; s++) begin
        if (!src[s].act && !stop_inj && ($urandom % 100) < rate) begin
          src[s].act = 1'b1;
          src[s].dst = (hot >= 0 && ($urandom % 4) != 0) ? hot : int'($urandom % NR);
          src[s].len = 1 + $urandom % 5;
          src[s].idx = 0;
          src[s].seq++;
          pending[s * 65536 + (src[s].seq & 16'hffff)] = 1'b1;
        end
        inj_valid[s] = src[s].act;
        if (src[s].act) inj_flit[s] = mkf(s, src[s]);
      end
    end
  end

  // ---------------- receivers ----------------
  int exp_idx [NR][NUM_VC];
  int exp_key [NR][NUM_VC];
  always @(posedge clk_core) begin
    if (rst_n) begin
      for (int d = 0; d < NR; d++) begin
        if (ej_valid[d]) begin
          int s, dd, seq, idx, len, v, key;
          s   = int'(ej_flit[d].data[63:56]);
          dd  = int'(ej_flit[d].data[55:48]);
          seq = int'(ej_flit[d].data[47:32]);
          idx = int'(ej_flit[d].data[31:24]);
          len = int'(ej_flit[d].data[23:16]);
          v   = int'(ej_flit[d].vc);
          key = s * 65536 + seq;
          checks++;
          if (dd != d) begin failures++; $display("FAIL: packet for %0d ejected at %0d", dd, d); end
          if (idx == 0) begin
            if (exp_idx[d][v] != 0) begin failures++; $display("FAIL: head inside a packet at %0d", d); end
            exp_key[d][v] = key;
          end else if (exp_key[d][v] != key || exp_idx[d][v] != idx) begin
            failures++;
            $display("FAIL: flit order at %0d vc %0d", d, v);
          end
          exp_idx[d][v] = (idx == len - 1) ? 0 : idx + 1;
          if (idx == len - 1) begin
            if (!pending.exists(key)) begin failures++; $display("FAIL: unknown or duplicate packet"); end
            else pending.delete(key);
            rcvd++;
          end
        end
      end
    end
  end

  // ---------------- mechanism counters (clk_pll domain) ----------------
  int n_up = 0, n_down = 0, n_ramp = 0, n_odd_div = 0, n_fifo_full = 0, n_credit_stall = 0;
  int n_unsafe = 0;
  // lowest voltage code for divisor d: f = 4000 / d MHz against 250/500/750
  function automatic int need_vid(int d);
    if (d * 250 >= 4000) return 0;
    if (d * 500 >= 4000) return 1;
    if (d * 750 >= 4000) return 2;
    return 3;
  endfunction
  logic [NR-1:0][DIV_W-1:0] prev_div;
  vid_e [NR-1:0] prev_vid;
  always @(posedge clk_pll) begin
    if (rst_n) begin
      for (int r = 0; r < NR; r++) begin
        if (router_div[r] < prev_div[r]) begin
          n_up++;
          // an increase happens only with enough voltage already in place
          if (dvs_en && int'(prev_vid[r]) < need_vid(int'(router_div[r]))) n_unsafe++;
        end
        if (router_div[r] > prev_div[r]) n_down++;
        if (router_vid[r] > prev_vid[r]) n_ramp++;
        if (policy_sel == POLICY_LINEAR && !(router_div[r] inside {6'd5, 6'd8, 6'd16}))
          n_odd_div++;
      end
    end
    if (rst_n)
      for (int r = 0; r < NR; r++) begin
        int lead;
        lead = ((r / 4) / 2) * 8 + ((r % 4) / 2) * 2;
        if (router_div[r] != router_div[lead] || router_vid[r] != router_vid[lead]) n_split++;
      end
    prev_div <= router_div;
    prev_vid <= router_vid;
  end

  int n_held = 0, n_intra = 0, n_split = 0;
  for (genvar i = 0; i < 4; i++) begin : g_imon
    always @(posedge clk_pll)
      if (rst_n && dut.g_isl[i].u_thr.sample && dut.g_isl[i].u_thr.want != dut.g_isl[i].u_thr.req_div &&
          !dut.g_isl[i].u_thr.changed && policy_sel == POLICY_THRESHOLD)
        n_held++;
  end
  for (genvar r = 0; r < NR; r++) begin : g_mon
    always @(posedge dut.rclk[r]) begin
      if (rst_n) begin
        for (int p = 1; p < NUM_PORTS; p++)
          if (dut.r_out_valid[r][p] && !dut.r_out_ready[r][p]) n_fifo_full++;
        // east and south links that stay inside a quadrant
        if (dut.r_out_valid[r][2] && (r % 4) % 2 == 0) n_intra++;
        if (dut.r_out_valid[r][3] && (r / 4) % 2 == 0) n_intra++;
        for (int p = 0; p < NUM_PORTS; p++)
          for (int v = 0; v < NUM_VC; v++)
            if (dut.g_rtr[r].u_rtr.state[p][v] == 2'd2 && dut.g_rtr[r].u_rtr.cnt[p][v] != 0 &&
                dut.g_rtr[r].u_rtr.credit[dut.g_rtr[r].u_rtr.route[p][v]][dut.g_rtr[r].u_rtr.ovc[p][v]] == 0)
              n_credit_stall++;
      end
    end
  end

  task automatic run_us(input int us);
    repeat (us * 4000) @(posedge clk_pll);
  endtask

  initial begin
    int d250;
    // the island clocks stand still during reset: give the asynchronous
    // reset a falling edge
    #1 rst_n = 1'b0;
    repeat (10) @(posedge clk_pll);
    rst_n = 1'b1;
    started = 1'b1;
    // A: light traffic, threshold policy with DVFS
    rate = 2;
    run_us(6);
    d250 = 0;
    for (int r = 0; r < NR; r++) if (router_div[r] == 16) d250++;
    check(d250 >= 8, $sformatf("light load: only %0d routers at 250 MHz", d250));
    // B: hot-spot bursts
    rate = 60;
    hot = 5;
    run_us(16);
    check(n_up > 0 && n_ramp > 0, "burst: frequency raised after voltage ramps");
    // C: linear policy
    hot = -1;
    rate = 30;
    policy_sel = POLICY_LINEAR;
    run_us(5);
    // D: fixed 1 GHz, frequency scaling only
    rate = 20;
    policy_sel = POLICY_FIXED;
    dvs_en = 1'b0;
    run_us(8);
    check(router_div[0] == 4 && router_vid[0] == VID_1V0, "fixed 1 GHz at nominal voltage");
    // drain
    stop_inj = 1'b1;
    run_us(4);
    check(pending.size() == 0, $sformatf("%0d packets never delivered", pending.size()));
    check(sent == rcvd && sent > 1000, $sformatf("sent %0d received %0d", sent, rcvd));
    check(n_unsafe == 0, "frequency raised above what the present voltage supports");
    $display("mechanisms: up=%0d down=%0d ramps=%0d held=%0d linear_divs=%0d inj_full=%0d hs_busy=%0d credit_stall=%0d intra=%0d",
             n_up, n_down, n_ramp, n_held, n_odd_div, inj_full, n_fifo_full, n_credit_stall, n_intra);
    check(n_up > 0, "frequency increases");
    check(n_down > 0, "frequency decreases");
    check(n_ramp > 0, "voltage ramps");
    check(n_held > 0, "changes held back by the minimum interval");
    check(n_odd_div > 0, "linear policy divisors");
    check(inj_full > 0, "injection FIFO full");
    check(n_fifo_full > 0, "handshake busy on an inter-island link");
    check(n_intra > 0, "traffic on links inside an island");
    check(n_split == 0, "routers of one island share divisor and voltage");
    check(n_credit_stall > 0, "credit stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog sent=%0d rcvd=%0d", sent, rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
