// clustering_module: groups hits (or clusters) that lie closer in time than a
// programmable window, and writes the resulting clusters, sorted in time, in
// the RICH format. The same module serves the pre-processing FPGAs (input:
// single hits) and the sync-link FPGA (input: pre-clusters of several PPs).
//
// Structure: data_distributor -> N_ROWS clustering_rows of N_CELLS cells
// (one row per 25 ns frame, two rows filled at a time, older rows flushed
// through their FIFOs) -> data_collector (retriever, sorter, discard,
// formatter). Each cluster keeps a seed time, its number of hits N and a
// cluster time-sum CTS = sum N_i (t_i - seed), from which the average
// calculator later derives the cluster time.
// Interface: RICH words in and out with valid/ready; window (100 ps units),
// mult_min/mult_max (kept multiplicity range) are run settings.
// Throughput: one word per cycle. Latency of a row: 2*N_CELLS + MUL_LAT plus
// the FIFO and quiet-time cycles (the design's L = 2*4 + 3 + 3 = 14).
// Sizes are the design's: 16 rows, 4 cells, multiplier latency 3.
module clustering_module
  import rich_pkg::*;
#(
  parameter int unsigned N_ROWS  = 16,
  parameter int unsigned N_CELLS = 4,
  parameter int unsigned MUL_LAT = 3,
  parameter int unsigned N_RAMS  = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [7:0]     window,
  input  logic [N_W-1:0] mult_min,
  input  logic [N_W-1:0] mult_max,
  input  logic           in_valid,
  output logic           in_ready,
  input  rich_word_t     in_word,
  output logic           out_valid,
  input  logic           out_ready,
  output rich_word_t     out_word,
  output logic [15:0]    cell_overflows,   // clusters lost to full rows
  output logic [15:0]    overflow_hits,    // hits added to the previous frame's row
  output logic [15:0]    drops,            // late words, overflowed positions, late clusters
  output logic [15:0]    discards          // clusters outside the multiplicity range
);
  logic [N_ROWS-1:0]  row_alloc, row_in_valid, row_flush, row_idle, rd_pop, rd_empty;
  logic [FRAME_W-1:0] alloc_frame;
  cluster_t           row_in_cl;
  row_entry_t         rd_entry [N_ROWS];
  logic [15:0]        row_ovf  [N_ROWS];
  logic [15:0]        dist_late, pos_drops, fmt_late;

  data_distributor #(.N_ROWS(N_ROWS)) u_dist (
    .clk, .rst_n, .window,
    .in_valid, .in_ready, .in_word,
    .row_alloc, .alloc_frame, .row_in_valid, .row_in_cl, .row_flush, .row_idle,
    .late_drops (dist_late),
    .overflow_hits
  );

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    logic [FRAME_W-1:0] frame_unused;
    clustering_row #(.N_CELLS(N_CELLS), .MUL_LAT(MUL_LAT), .FIFO_DEPTH(2*N_CELLS)) u_row (
      .clk, .rst_n, .window,
      .alloc       (row_alloc[r]),
      .alloc_frame (alloc_frame),
      .in_valid    (row_in_valid[r]),
      .in_cl       (row_in_cl),
      .flush_req   (row_flush[r]),
      .idle        (row_idle[r]),
      .frame       (frame_unused),
      .rd_pop      (rd_pop[r]),
      .rd_entry    (rd_entry[r]),
      .rd_empty    (rd_empty[r]),
      .overflows   (row_ovf[r])
    );
  end

  data_collector #(.N_ROWS(N_ROWS), .N_CELLS(N_CELLS), .N_RAMS(N_RAMS)) u_coll (
    .clk, .rst_n, .mult_min, .mult_max,
    .rd_pop, .rd_entry, .rd_empty,
    .out_valid, .out_ready, .out_word,
    .pos_drops, .mult_discards (discards),
    .late_drops (fmt_late)
  );

  always_comb begin
    logic [20:0] s;
    s = '0;
    for (int r = 0; r < N_ROWS; r++) s += 21'(row_ovf[r]);
    cell_overflows = s > 21'hFFFF ? 16'hFFFF : s[15:0];
    s = 21'(dist_late) + 21'(pos_drops) + 21'(fmt_late);
    drops = s > 21'hFFFF ? 16'hFFFF : s[15:0];
  end
endmodule
