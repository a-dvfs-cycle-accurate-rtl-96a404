// tb_vc_router: self-checking test of one mesh router at column 1, row 1.
//
// 1. Pipeline timing: a single-flit packet entering the idle router leaves
//    on the XY output after exactly 3 more clock edges (VA, SA, ST)
//    and its credit returns upstream.
// 2. Random traffic: every input port injects multi-flit packets to random
//    destinations on random virtual channels, obeying credits and the rule
//    that a packet starts on a VC only once all its credits are back. The
//    outputs stall at random and return credits after random delays. The
//    checker verifies that every flit leaves on the XY port, that flits of
//    one packet stay in order and are not interleaved with another packet
//    on the same output VC, that all packets arrive, that every credit
//    comes back, and that the congestion count equals the flits the test
//    knows to be n_inside the router.
module tb_vc_router;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  localparam int NV = NUM_VC;
  localparam int BD = 4;
  localparam int MX = 1, MY = 1;
  localparam int NPKT = 60;   // packets per input port

  logic clk = 1'b0, rst_n = 1'b0;
  logic  [NP-1:0] in_valid = '0;
  flit_t [NP-1:0] in_flit = '0;
  logic  [NP-1:0] cr_out_valid, cr_out_ready = '1;
  logic  [NP-1:0][VC_W-1:0] cr_out_vc;
  logic  [NP-1:0] out_valid, out_ready = '0;
  flit_t [NP-1:0] out_flit;
  logic  [NP-1:0] cr_in_valid = '0;
  logic  [NP-1:0][VC_W-1:0] cr_in_vc = '0;
  logic [6:0] congestion;

  vc_router #(.MY_X(MX), .MY_Y(MY), .BUF_DEPTH(BD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic int xy(int dx, int dy);
    if (dx > MX) return 2;
    if (dx < MX) return 4;
    if (dy > MY) return 3;
    if (dy < MY) return 1;
    return 0;
  endfunction

  // flit payload: [47:40] src port, [39:24] packet number, [23:16] index, [15:8] length
  function automatic flit_t mk(int src, int pkt, int idx, int len, int vc, int dx, int dy);
    flit_t f;
    f.data  = {16'h0, 8'(src), 16'(pkt), 8'(idx), 8'(len), 8'h5a};
    f.vc    = VC_W'(vc);
    f.dst_x = COORD_W'(dx);
    f.dst_y = COORD_W'(dy);
    if (len == 1)          f.ftype = FLIT_HEADTAIL;
    else if (idx == 0)     f.ftype = FLIT_HEAD;
    else if (idx == len-1) f.ftype = FLIT_TAIL;
    else                   f.ftype = FLIT_BODY;
    return f;
  endfunction

  // upstream sender state
  int up_cred [NP][NV];
  int n_inside = 0;          // flits sent into the router and not yet out

  // ---------------- phase 1: pipeline latency ----------------
  initial begin
    int lat;
    for (int p = 0; p < NP; p++) for (int v = 0; v < NV; v++) up_cred[p][v] = BD;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    out_ready = '1;
    @(posedge clk); #1;
    in_valid[4] = 1'b1;
    in_flit[4]  = mk(4, 9999, 0, 1, 2, 3, 1);
    up_cred[4][2]--;
    @(posedge clk); #1;           // written at this edge (BW/RC)
    in_valid[4] = 1'b0;
    lat = 0;
    while (!out_valid[2] && lat < 10) begin @(posedge clk); #1; lat++; end
    check(lat == 3, $sformatf("head latency %0d edges after BW, expected 3", lat));
    check(out_flit[2].data[39:24] == 16'd9999, "single flit payload");
    @(posedge clk); #1;
    // the router returned a credit for input 4, VC 2
    check(up_cred[4][2] == BD, "credit returned upstream after departure");
    // the test's downstream gives the output credit back
    cr_in_valid[2] = 1'b1; cr_in_vc[2] = out_flit[2].vc;
    @(posedge clk); #1;
    cr_in_valid[2] = 1'b0;
    repeat (5) @(posedge clk);
    check(dut.credit[2][2] == BD, "output credit restored");
    phase1_done = 1'b1;
  end
  bit phase1_done = 1'b0;

  // credits the router returns to the upstream senders
  always @(posedge clk) begin
    if (rst_n)
      for (int p = 0; p < NP; p++)
        if (cr_out_valid[p] && cr_out_ready[p]) up_cred[p][cr_out_vc[p]]++;
  end

  // ---------------- phase 2: random traffic ----------------
  typedef struct { int dx, dy, len, vc, idx, pkt; } pk_t;
  pk_t cur [NP][NV];
  bit  act [NP][NV];
  int  sent_pkts [NP];
  int  total_sent = 0, total_rcvd = 0, total_flits_out = 0;

  always @(posedge clk) begin
    if (phase1_done) begin
      #1;
      cr_out_ready = NP'($urandom);
      for (int p = 0; p < NP; p++) begin
        int v;
        in_valid[p] = 1'b0;
        // possibly start a packet on a VC whose credits are all back
        v = $urandom % NV;
        if (!act[p][v] && up_cred[p][v] == BD && sent_pkts[p] < NPKT && ($urandom % 2)) begin
          act[p][v] = 1'b1;
          cur[p][v].dx = $urandom % MESH_X;
          cur[p][v].dy = $urandom % MESH_Y;
          cur[p][v].len = 1 + $urandom % 5;
          cur[p][v].idx = 0;
          cur[p][v].pkt = p * 1000 + sent_pkts[p];
          sent_pkts[p]++;
        end
        // send one flit of a random active packet with a credit
        v = $urandom % NV;
        if (act[p][v] && up_cred[p][v] > 0 && ($urandom % 4) != 0) begin
          in_valid[p] = 1'b1;
          in_flit[p]  = mk(p, cur[p][v].pkt, cur[p][v].idx, cur[p][v].len, v,
                           cur[p][v].dx, cur[p][v].dy);
          up_cred[p][v]--;
          n_inside++;
          cur[p][v].idx++;
          if (cur[p][v].idx == cur[p][v].len) begin
            act[p][v] = 1'b0;
            total_sent++;
          end
        end
      end
    end
  end

  // downstream side: random stalls, per output VC ordering, delayed credits
  int exp_idx [NP][NV];
  int exp_pkt [NP][NV];
  int cq_vc [NP][$];
  int cq_t  [NP][$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (phase1_done) begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          flit_t f;
          int pkt, idx, len, v;
          f = out_flit[o];
          pkt = int'(f.data[39:24]);
          idx = int'(f.data[23:16]);
          len = int'(f.data[15:8]);
          v = int'(f.vc);
          n_inside--;
          total_flits_out++;
          check(xy(int'(f.dst_x), int'(f.dst_y)) == o, "flit on XY output port");
          if (idx == 0) begin
            check(exp_idx[o][v] == 0, "head only after previous tail on this output VC");
            exp_pkt[o][v] = pkt;
          end else begin
            check(exp_pkt[o][v] == pkt && exp_idx[o][v] == idx, "packet flits in order, not interleaved");
          end
          exp_idx[o][v] = (idx == len - 1) ? 0 : idx + 1;
          if (idx == len - 1) total_rcvd++;
          cq_vc[o].push_back(v);
          cq_t[o].push_back(cyc + 1 + $urandom % 6);
        end
      end
      #1;
      for (int o = 0; o < NP; o++) begin
        out_ready[o] = ($urandom % 10) < 7;
        cr_in_valid[o] = 1'b0;
        if (cq_t[o].size() != 0 && cq_t[o][0] <= cyc) begin
          cr_in_valid[o] = 1'b1;
          cr_in_vc[o] = VC_W'(cq_vc[o].pop_front());
          void'(cq_t[o].pop_front());
        end
      end
    end
  end

  // congestion equals flits n_inside the router minus those on the input
  // wires (not yet written) and those in the ST and output registers
  int cong_bad = 0, cong_checks = 0;
  always @(negedge clk) begin
    int in_st;
    if (phase1_done) begin
      cong_checks++;
      in_st = 0;
      for (int o = 0; o < NP; o++) in_st += int'(dut.st_valid[o]);
      if (int'(congestion) != n_inside - $countones(in_valid) - $countones(out_valid) - in_st) cong_bad++;
    end
  end

  initial begin
    wait (phase1_done);
    wait (total_sent == NP * NPKT);
    repeat (200) @(posedge clk);
    check(total_rcvd == NP * NPKT, $sformatf("packets delivered %0d of %0d", total_rcvd, NP * NPKT));
    check(n_inside == 0, "no flit left inside");
    check(congestion == 0, "congestion zero when idle");
    check(cong_bad == 0 && cong_checks > 100, $sformatf("congestion count wrong in %0d cycles", cong_bad));
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++)
        check(up_cred[p][v] == BD, "all credits returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog sent=%0d rcvd=%0d", total_sent, total_rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
