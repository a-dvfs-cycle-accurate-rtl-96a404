// fifo_resync: bi-synchronous FIFO resynchronizer between two clock domains.
//
// The writer pushes at its own clock (wr_clk) until the FIFO is full; the
// reader pops at its clock (rd_clk) while it is not empty. full is produced
// in the write domain and empty in the read domain, as the document's FIFO
// resynchronizer does; DEPTH defaults to the six slots of its FIFO-6 setup.
//
// How it works: each side keeps a pointer that counts modulo 2*DEPTH as a
// Johnson (twisted-ring) code of DEPTH bits. Consecutive Johnson codes differ
// in exactly one bit, so a pointer can be passed to the other domain through
// a plain SYNC_STAGES flip-flop synchronizer and any sample is either the old
// or the new value; this works for a depth that is not a power of two, where
// Gray counters do not. The synchronized code is turned back into a count
// (number of ones, mirrored in the second half-turn). Empty: both counts
// equal. Full: write count minus read count equals DEPTH (mod 2*DEPTH).
// The storage is a register array with a combinational read port
// (first-word fall-through). The pointer coding and the synchronizer depth
// are this design's own choices; the document takes the FIFO from earlier work
// and gives only its function.
//
// Interface: wr_valid/wr_ready/wr_data (wr_ready = not full); rd_valid/
// rd_ready/rd_data (rd_valid = not empty). Timing: a word written at a wr_clk
// edge is visible to the reader after SYNC_STAGES rd_clk edges; a freed slot
// is seen by the writer after SYNC_STAGES wr_clk edges.
module fifo_resync #(
  parameter int unsigned WIDTH       = 72,
  parameter int unsigned DEPTH       = 6,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);

  localparam int unsigned CNT_W = $clog2(2 * DEPTH);
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef logic [DEPTH-1:0] jc_t;

  function automatic jc_t jc_next(jc_t j);
    return {j[DEPTH-2:0], ~j[DEPTH-1]};
  endfunction

  // Johnson code to count 0 .. 2*DEPTH-1
  function automatic logic [CNT_W-1:0] jc_to_cnt(jc_t j);
    logic [CNT_W-1:0] ones;
    ones = '0;
    for (int i = 0; i < DEPTH; i++) ones = ones + CNT_W'(j[i]);
    if (j[DEPTH-1] && !j[0]) return CNT_W'(2 * DEPTH) - ones;
    return ones;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // ---------------- write domain ----------------
  jc_t              wr_jc;
  logic [IDX_W-1:0] wr_idx;
  jc_t              rd_jc_sync [SYNC_STAGES];
  logic [CNT_W-1:0] wr_cnt, rd_cnt_w, used_w;
  logic             full, push;

  assign wr_cnt   = jc_to_cnt(wr_jc);
  assign rd_cnt_w = jc_to_cnt(rd_jc_sync[SYNC_STAGES-1]);
  assign used_w   = (wr_cnt >= rd_cnt_w) ? wr_cnt - rd_cnt_w
                                         : wr_cnt + CNT_W'(2 * DEPTH) - rd_cnt_w;
  assign full     = (used_w == CNT_W'(DEPTH));
  assign wr_ready = ~full;
  assign push     = wr_valid & ~full;

  // ---------------- read domain ----------------
  jc_t              rd_jc;
  logic [IDX_W-1:0] rd_idx;
  jc_t              wr_jc_sync [SYNC_STAGES];
  logic             empty, pop;

  assign empty    = (rd_jc == wr_jc_sync[SYNC_STAGES-1]);
  assign rd_valid = ~empty;
  assign pop      = rd_ready & ~empty;
  assign rd_data  = mem[rd_idx];

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_jc  <= '0;
      wr_idx <= '0;
      for (int s = 0; s < SYNC_STAGES; s++) rd_jc_sync[s] <= '0;
    end else begin
      rd_jc_sync[0] <= rd_jc;
      for (int s = 1; s < SYNC_STAGES; s++) rd_jc_sync[s] <= rd_jc_sync[s-1];
      if (push) begin
        wr_jc  <= jc_next(wr_jc);
        wr_idx <= (wr_idx == IDX_W'(DEPTH - 1)) ? '0 : wr_idx + 1'b1;
      end
    end
  end

  // Storage has no reset: a slot is only read after it has been written.
  always_ff @(posedge wr_clk) begin
    if (push) mem[wr_idx] <= wr_data;
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_jc  <= '0;
      rd_idx <= '0;
      for (int s = 0; s < SYNC_STAGES; s++) wr_jc_sync[s] <= '0;
    end else begin
      wr_jc_sync[0] <= wr_jc;
      for (int s = 1; s < SYNC_STAGES; s++) wr_jc_sync[s] <= wr_jc_sync[s-1];
      if (pop) begin
        rd_jc  <= jc_next(rd_jc);
        rd_idx <= (rd_idx == IDX_W'(DEPTH - 1)) ? '0 : rd_idx + 1'b1;
      end
    end
  end

endmodule
