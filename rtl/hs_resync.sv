// hs_resync: edge-sensitive two-phase handshake resynchronizer.
//
// Carries one word at a time from a sender clock domain (tx_clk) to a
// receiver clock domain (rx_clk) using only two single-bit control wires,
// req and ack, next to the data link. Structure (follows the document's
// handshake scheme):
//   sender:   new_flit = tx_valid & tx_ready toggles the req flip-flop and
//             loads the outgoing data register in the same cycle. ack comes
//             back through a two flip-flop synchronizer; busy = req XOR
//             synchronized ack holds off new words until the receiver has
//             acknowledged the last one.
//   receiver: req passes a two flip-flop synchronizer (req', req_stable); a
//             third flip-flop and an XOR form an edge detector whose output,
//             data_valid, marks the word in the receive register. req_stable
//             is returned as ack.
// Every req edge is one transfer (two-phase signalling), so no return-to-zero
// phase is needed.
//
// Interface: tx_valid/tx_ready/tx_data in the tx_clk domain (tx_data is
// captured when accepted, so a sender may keep updating it while it waits); rx_valid/rx_data
// in the rx_clk domain; rx_valid is data_valid, a one-cycle pulse that the
// receiver must accept. Timing: a word launched at a tx_clk edge is in
// rx_data, with rx_valid high, after the second rx_clk edge (the two
// synchronizer stages); tx_ready returns 2 tx_clk edges after req_stable
// toggles, so at equal clocks one word passes every 4 cycles.
// This design's own choice: the receive register loads on the rx edge at
// which req_stable toggles (req' differs from req_stable). The document shows
// a receive register without saying when it loads; loading it one edge later,
// from data_valid, would let a sender much faster than the receiver replace
// the link data, after seeing ack, before it was captured.
module hs_resync #(
  parameter int unsigned WIDTH = 72
) (
  // sender domain
  input  logic             tx_clk,
  input  logic             tx_rst_n,
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [WIDTH-1:0] tx_data,
  // receiver domain
  input  logic             rx_clk,
  input  logic             rx_rst_n,
  output logic             rx_valid,
  output logic [WIDTH-1:0] rx_data
);

  // ---------------- sender side ----------------
  logic             req_q;
  logic             ack_s1, ack_s2;
  logic             busy;
  logic             new_flit;
  logic [WIDTH-1:0] link_q;
  logic             ack;

  assign busy     = req_q ^ ack_s2;
  assign tx_ready = ~busy;
  assign new_flit = tx_valid & tx_ready;

  always_ff @(posedge tx_clk or negedge tx_rst_n) begin
    if (!tx_rst_n) begin
      req_q  <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
      link_q <= '0;
    end else begin
      req_q  <= req_q ^ new_flit;
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
      if (new_flit) link_q <= tx_data;
    end
  end

  // ---------------- receiver side ----------------
  logic req_s1, req_stable, req_d3;
  logic data_valid;

  assign data_valid = req_stable ^ req_d3;
  assign ack        = req_stable;
  assign rx_valid   = data_valid;

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      req_s1     <= 1'b0;
      req_stable <= 1'b0;
      req_d3     <= 1'b0;
      rx_data    <= '0;
    end else begin
      req_s1     <= req_q;
      req_stable <= req_s1;
      req_d3     <= req_stable;
      // capture on the edge at which req_stable (and so ack) toggles: the
      // sender cannot change the link before it has seen that ack
      if (req_s1 ^ req_stable) rx_data <= link_q;
    end
  end

  // Two req edges are always separated by a full req/ack round trip, so
  // the receiver never sees data_valid in two consecutive cycles.
  a_single_pulse : assert property (@(posedge rx_clk) disable iff (!rx_rst_n)
    data_valid |=> !data_valid);

endmodule
