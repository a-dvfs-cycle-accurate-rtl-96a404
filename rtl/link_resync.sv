// link_resync: one resynchronized channel between two clock domains.
//
// Picks, by parameter, the resynchronization scheme placed on a link:
//   RESYNC_NONE       both ends share a clock; the channel is a wire and
//                     rx_ready back-pressures the sender directly.
//   RESYNC_HANDSHAKE  hs_resync (two-phase req/ack, one word in flight);
//                     the receiver cannot back-pressure, so it must accept
//                     every rx_valid (checked by an assertion).
//   RESYNC_FIFO       fifo_resync with FIFO_DEPTH slots.
// The document lets a link carry either scheme; this wrapper and the rule
// that a same-island link needs none are this design's own choices.
//
// Interface: tx_valid/tx_ready/tx_data in the tx_clk domain, rx_valid/
// rx_ready/rx_data in the rx_clk domain. Latency is that of the selected
// scheme (0, 3 or SYNC_STAGES receiver cycles).
module link_resync
  import noc_pkg::*;
#(
  parameter int unsigned WIDTH      = FLIT_W,
  parameter resync_e     KIND       = RESYNC_FIFO,
  parameter int unsigned FIFO_DEPTH = 6
) (
  input  logic             tx_clk,
  input  logic             tx_rst_n,
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [WIDTH-1:0] tx_data,
  input  logic             rx_clk,
  input  logic             rx_rst_n,
  output logic             rx_valid,
  input  logic             rx_ready,
  output logic [WIDTH-1:0] rx_data
);

  if (KIND == RESYNC_HANDSHAKE) begin : g_hs
    hs_resync #(.WIDTH(WIDTH)) u_hs (
      .tx_clk, .tx_rst_n, .tx_valid, .tx_ready, .tx_data,
      .rx_clk, .rx_rst_n, .rx_valid, .rx_data
    );
    a_rx_accept : assert property (@(posedge rx_clk) disable iff (!rx_rst_n)
      rx_valid |-> rx_ready);
  end else if (KIND == RESYNC_FIFO) begin : g_fifo
    fifo_resync #(.WIDTH(WIDTH), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk(tx_clk), .wr_rst_n(tx_rst_n), .wr_valid(tx_valid),
      .wr_ready(tx_ready), .wr_data(tx_data),
      .rd_clk(rx_clk), .rd_rst_n(rx_rst_n), .rd_valid(rx_valid),
      .rd_ready(rx_ready), .rd_data(rx_data)
    );
  end else begin : g_wire
    assign rx_valid = tx_valid;
    assign rx_data  = tx_data;
    assign tx_ready = rx_ready;
  end

endmodule
