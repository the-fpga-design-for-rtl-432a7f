// data_collector: output stage of the clustering module. Four parts in a row:
//   - data retriever: reads the rows' output FIFOs in row order, N_CELLS
//     entries per row (each flushed row yields exactly N_CELLS entries), one
//     entry per cycle, moving to the next row without a bubble;
//   - sorter: writes each cluster of a row into a small RAM at the address
//     given by the cell's position field, so the RAM ends up ordered by seed
//     time; N_RAMS RAMs of N_CELLS positions are used in turn, so the
//     retriever can fill one while later ones are being read;
//   - cluster discard: a cluster whose number of hits is outside
//     [mult_min, mult_max] is removed (it still marks its timestamp as seen);
//   - formatter: the sorted clusters, with absolute time
//     {frame, 8'b0} + seed, go through rich_formatter and leave as RICH words.
// A cluster with a position of N_CELLS or more (possible after its row
// overflowed) has no RAM slot; it is dropped and counted in pos_drops. The
// internal time-sum is saturated to the 8-bit field of the format.
// The four parts and the RAM organisation follow the design; the exact
// handling of overflowed positions and of the 8-bit CTS is this
// implementation's choice. Throughput one entry per cycle.
module data_collector
  import rich_pkg::*;
#(
  parameter int unsigned N_ROWS  = 16,
  parameter int unsigned N_CELLS = 4,
  parameter int unsigned N_RAMS  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_W-1:0]    mult_min,
  input  logic [N_W-1:0]    mult_max,
  output logic [N_ROWS-1:0] rd_pop,
  input  row_entry_t        rd_entry [N_ROWS],
  input  logic [N_ROWS-1:0] rd_empty,
  output logic              out_valid,
  input  logic              out_ready,
  output rich_word_t        out_word,
  output logic [15:0]       pos_drops,
  output logic [15:0]       mult_discards,
  output logic [15:0]       late_drops
);
  localparam int unsigned RW = $clog2(N_ROWS);
  localparam int unsigned BW = $clog2(N_RAMS);
  localparam int unsigned SW = $clog2(N_CELLS);

  // ---------------- data retriever + sorter write side -----------------
  logic [RW-1:0] rr;
  logic [SW-1:0] rcnt;
  logic [BW-1:0] wb, rb;
  logic [SW-1:0] rs;

  cluster_t           ram     [N_RAMS][N_CELLS];
  logic [N_CELLS-1:0] ram_v   [N_RAMS];
  logic [FRAME_W-1:0] ram_frm [N_RAMS];
  logic [N_RAMS-1:0]  ram_full;

  row_entry_t e;
  logic       take;
  assign e    = rd_entry[rr];
  assign take = !rd_empty[rr] && !ram_full[wb];

  always_comb begin
    rd_pop     = '0;
    rd_pop[rr] = take;
  end

  // ---------------- sorter read side + cluster discard ------------------
  rich_item_t            item;
  logic                  item_valid, item_ready;
  logic [TIME_W-1:0]     abs_t;
  cluster_t              rcl;
  logic                  slot_v, keep;
  assign rcl    = ram[rb][rs];
  assign slot_v = ram_v[rb][rs];
  assign abs_t  = {ram_frm[rb], 8'h00} + TIME_W'(rcl.t);
  assign keep   = slot_v && rcl.n >= mult_min && rcl.n <= mult_max;

  always_comb begin
    item_valid   = ram_full[rb];
    item.is_data = keep;
    item.ts      = slot_v ? abs_t[TIME_W-1:FINE_W] : ram_frm[rb][FRAME_W-1:4];
    item.fine    = abs_t[FINE_W-1:0];
    item.n       = rcl.n;
    item.cts     = sat_cts(rcl.cts);
  end

  logic rd_fire, rd_last;
  assign rd_fire = item_valid && item_ready;
  assign rd_last = rs == SW'(N_CELLS-1);

  always_ff @(posedge clk) begin
    if (take && e.valid && e.pos < POS_W'(N_CELLS)) ram[wb][e.pos[SW-1:0]] <= e.cl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr            <= '0;
      rcnt          <= '0;
      wb            <= '0;
      rb            <= '0;
      rs            <= '0;
      ram_full      <= '0;
      pos_drops     <= '0;
      mult_discards <= '0;
      for (int i = 0; i < N_RAMS; i++) begin
        ram_v[i]   <= '0;
        ram_frm[i] <= '0;
      end
    end else begin
      if (take) begin
        if (e.valid) begin
          if (e.pos < POS_W'(N_CELLS)) ram_v[wb][e.pos[SW-1:0]] <= 1'b1;
          else if (pos_drops != '1) pos_drops <= pos_drops + 1'b1;
        end
        rcnt <= rcnt + 1'b1;
        if (rcnt == SW'(N_CELLS-1)) begin
          rcnt         <= '0;
          rr           <= (rr == RW'(N_ROWS-1)) ? '0 : rr + 1'b1;
          ram_full[wb] <= 1'b1;
          ram_frm[wb]  <= e.frame;
          wb           <= (wb == BW'(N_RAMS-1)) ? '0 : wb + 1'b1;
        end
      end
      if (rd_fire) begin
        if (slot_v && !keep && mult_discards != '1) mult_discards <= mult_discards + 1'b1;
        rs <= rs + 1'b1;
        if (rd_last) begin
          rs           <= '0;
          ram_full[rb] <= 1'b0;
          ram_v[rb]    <= '0;
          rb           <= (rb == BW'(N_RAMS-1)) ? '0 : rb + 1'b1;
        end
      end
    end
  end

  rich_formatter u_fmt (
    .clk, .rst_n,
    .in_valid  (item_valid),
    .in_ready  (item_ready),
    .in_item   (item),
    .out_valid, .out_ready, .out_word, .late_drops
  );
endmodule
