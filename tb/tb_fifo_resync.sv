// tb_fifo_resync: self-checking test of the bi-synchronous FIFO.
//
// Phase 1 (reader stopped): the writer fills the FIFO; exactly DEPTH words
// are accepted before full. The first word becomes visible to the reader
// after SYNC_STAGES = 2 read-clock edges. Phase 2 drains it and checks
// empty. Phase 3 streams 2000 random words with random stalls on both
// sides under unrelated clock periods (writer 10, reader 14, then writer 6,
// reader 26) and checks order and content against a queue.
module tb_fifo_resync;
  localparam int W = 16;
  localparam int DEPTH = 6;

  logic wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0, wr_ready, rd_valid, rd_ready = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int wp = 10, rp = 10;
  logic [W-1:0] q[$];
  int rcv = 0;
  bit rand_rd = 1'b0;
  bit drain = 1'b0;

  // reader stalls at random while rand_rd is set, then drains
  always @(posedge rd_clk) if (rst_n && (rand_rd || drain)) #1 rd_ready = rand_rd ? (($urandom % 3) != 0) : 1'b1;

  fifo_resync #(.WIDTH(W), .DEPTH(DEPTH)) dut (
    .wr_clk, .wr_rst_n(rst_n), .wr_valid, .wr_ready, .wr_data,
    .rd_clk, .rd_rst_n(rst_n), .rd_valid, .rd_ready, .rd_data
  );

  initial forever #(wp / 2) wr_clk = ~wr_clk;
  initial begin #3; forever #(rp / 2) rd_clk = ~rd_clk; end

  always @(posedge wr_clk) if (rst_n && wr_valid && wr_ready) q.push_back(wr_data);
  always @(posedge rd_clk) begin
    if (rst_n && rd_valid && rd_ready) begin
      logic [W-1:0] e;
      checks++;
      rcv++;
      e = (q.size() != 0) ? q.pop_front() : ~rd_data;
      if (e !== rd_data) begin
        failures++;
        $display("FAIL: read %h expected %h", rd_data, e);
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int acc, edges;
    repeat (3) @(posedge wr_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge wr_clk);
    // phase 1: fill with the reader stopped
    acc = 0;
    @(negedge wr_clk);
    check(!rd_valid, "empty after reset");
    wr_valid = 1'b1;
    wr_data  = 16'h1000;
    fork
      begin
        edges = 0;
        @(posedge wr_clk);
        while (!rd_valid) begin @(posedge rd_clk); #1; edges++; end
      end
      for (int i = 0; i < DEPTH + 4; i++) begin
        @(posedge wr_clk);
        if (wr_ready) acc++;
        #1 wr_data = wr_data + 1;
      end
    join
    wr_valid = 1'b0;
    check(acc == DEPTH, $sformatf("accepted %0d words before full, expected %0d", acc, DEPTH));
    check(!wr_ready, "full after DEPTH writes");
    check(edges == 2, $sformatf("first word visible after %0d read edges, expected 2", edges));
    // phase 2: drain
    @(negedge rd_clk);
    rd_ready = 1'b1;
    repeat (DEPTH + 2) @(posedge rd_clk);
    #1;
    check(!rd_valid, "empty after drain");
    check(rcv == DEPTH, "all words read");
    rd_ready = 1'b0;
    repeat (4) @(posedge wr_clk);
    #1;
    check(wr_ready, "not full after drain");
    // phase 3: random streaming at two clock ratios
    for (int phase = 0; phase < 2; phase++) begin
      wp = phase ? 6 : 10;
      rp = phase ? 26 : 14;
      rand_rd = 1'b1;
      for (int i = 0; i < 1000; i++) begin
        @(posedge wr_clk);
        #1;
        wr_valid = ($urandom % 4) != 0;
        wr_data  = W'($urandom);
        @(posedge wr_clk);
        while (wr_valid && !wr_ready) @(posedge wr_clk);
        #1 wr_valid = 1'b0;
      end
      rand_rd = 1'b0;
      drain = 1'b1;
      repeat (40) @(posedge rd_clk);
      check(q.size() == 0, "stream fully delivered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
