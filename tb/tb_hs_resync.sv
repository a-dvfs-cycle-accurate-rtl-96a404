// tb_hs_resync: self-checking test of the two-phase handshake resynchronizer.
//
// Phase 1 runs both domains at the same period, the receiver clock 2 time
// units behind, and checks the exact timing the structure implies: a word
// launched at a tx edge appears on rx_valid after the second rx edge, and
// with tx_valid held high a new word is accepted every fourth tx cycle (two rx synchronizer edges out, two tx synchronizer edges back).
// Phase 2 runs unrelated periods (10 and 7) with random gaps and checks that
// every word arrives once, in order and unchanged.
module tb_hs_resync;
  localparam int W = 16;

  logic tx_clk = 1'b0, rx_clk = 1'b0, rst_n = 1'b0;
  logic tx_valid = 1'b0, tx_ready, rx_valid;
  logic [W-1:0] tx_data = '0, rx_data;
  int checks = 0, failures = 0;
  int tx_period = 10, rx_period = 10, rx_offset = 2;
  logic [W-1:0] q[$];

  hs_resync #(.WIDTH(W)) dut (
    .tx_clk, .tx_rst_n(rst_n), .tx_valid, .tx_ready, .tx_data,
    .rx_clk, .rx_rst_n(rst_n), .rx_valid, .rx_data
  );

  initial forever #(tx_period / 2) tx_clk = ~tx_clk;
  initial begin
    #(rx_offset);
    forever #(rx_period / 2) rx_clk = ~rx_clk;
  end

  // scoreboard: every received word matches the oldest sent one
  int received = 0;
  always @(posedge rx_clk) begin
    if (rst_n && rx_valid) begin
      checks++;
      received++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected word %h", rx_data);
      end else begin
        logic [W-1:0] exp;
        exp = q.pop_front();
        if (exp !== rx_data) begin
          failures++;
          $display("FAIL: got %h expected %h", rx_data, exp);
        end
      end
    end
  end

  // record accepted words and their launch time in tx cycles
  int tx_cyc = 0, last_accept = -1, accepts = 0, gap_fail = 0;
  time launch_t;
  always @(posedge tx_clk) begin
    tx_cyc++;
    if (rst_n && tx_valid && tx_ready) begin
      q.push_back(tx_data);
      launch_t = $time;
      if (last_accept >= 0) begin
        accepts++;
        if (tx_period == rx_period && tx_cyc - last_accept != 4) gap_fail++;
      end
      last_accept = tx_cyc;
    end
  end

  // rx edges between launch and delivery (phase 1)
  int rx_edges_since = 0, lat_checks = 0;
  always @(posedge rx_clk) begin
    if (tx_period == rx_period && rst_n) begin
      if ($time > launch_t) rx_edges_since++;
      if (rx_valid) begin
        lat_checks++;
        checks++;
        if (rx_edges_since != 2) begin
          failures++;
          $display("FAIL: latency %0d rx edges, expected 2", rx_edges_since);
        end
      end
    end
  end
  always @(posedge tx_clk) if (tx_valid && tx_ready) rx_edges_since = -1;

  initial begin
    repeat (3) @(posedge tx_clk);
    rst_n = 1'b1;
    // phase 1: same period, continuous stream
    @(negedge tx_clk);
    tx_valid = 1'b1;
    for (int i = 0; i < 20; i++) begin
      tx_data = W'($urandom);
      @(posedge tx_clk);
      while (!tx_ready) @(posedge tx_clk);
      @(negedge tx_clk);
    end
    tx_valid = 1'b0;
    repeat (10) @(posedge tx_clk);
    checks++;
    if (gap_fail != 0 || accepts != 19) begin
      failures++;
      $display("FAIL: %0d of %0d transfers not 4 tx cycles apart", gap_fail, accepts);
    end
    // phase 2: unrelated clocks, random gaps
    tx_period = 10;
    rx_period = 8;
    repeat (4) @(posedge tx_clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge tx_clk);
      tx_valid = ($urandom % 3) != 0;
      if (tx_valid) begin
        tx_data = W'($urandom);
        @(posedge tx_clk);
        while (!tx_ready) @(posedge tx_clk);
        @(negedge tx_clk);
        tx_valid = 1'b0;
      end
    end
    tx_valid = 1'b0;
    repeat (20) @(posedge tx_clk);
    checks++;
    if (q.size() != 0 || received < 100) begin
      failures++;
      $display("FAIL: %0d words lost, %0d received", q.size(), received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
