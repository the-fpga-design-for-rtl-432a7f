// rich_l0_top: the L0 trigger gateware of one read-out board of the RICH
// detector. Four pre-processing chains (one per TDC board) turn hits into
// time-ordered pre-clusters; the sync-link chain merges them, optionally
// together with the clusters of an upstream board received over the 16-bit
// InterTEL bus, clusters them again and computes each cluster's reference
// time. The last board of a daisy chain (last_board = 1) sends the result as
// primitives to the L0 trigger processor; any other board sends it on over
// its InterTEL output instead. Every module uses the same RICH word format.
// Interfaces: TDC inputs, InterTEL in/out (16-bit data with valid, and a
// ready line running back to the sender) and the primitive output all use a
// valid/ready handshake; the monitoring outputs are event counters kept
// since reset. The InterTEL ready line is this implementation's addition.
// Clock: one clock for all modules (160 MHz in the design). Settings window,
// mult_min, mult_max, intertel_en and last_board come from the board's
// control processor. The split into PP and SL chains follows the design; the
// daisy-chain switch is this implementation's reading of it.
module rich_l0_top
  import rich_pkg::*;
#(
  parameter int unsigned N_PP    = 4,
  parameter int unsigned N_ROWS  = 16,
  parameter int unsigned N_CELLS = 4,
  parameter int unsigned MUL_LAT = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        window,
  input  logic [N_W-1:0]    mult_min,
  input  logic [N_W-1:0]    mult_max,
  input  logic              intertel_en,
  input  logic              last_board,
  // TDC boards
  input  logic [N_PP-1:0]   tdc_valid,
  output logic [N_PP-1:0]   tdc_ready,
  input  logic [N_PP-1:0]   tdc_mark,
  input  logic [TIME_W-1:0] tdc_time [N_PP],
  // InterTEL bus
  input  logic              itel_in_valid,
  input  logic [15:0]       itel_in_data,
  output logic              itel_in_ready,
  output logic              itel_out_valid,
  output logic [15:0]       itel_out_data,
  input  logic              itel_out_ready,
  // primitives to the L0 trigger processor
  output logic              prim_valid,
  input  logic              prim_ready,
  output rich_word_t        prim_word,
  // monitoring
  output logic [15:0]       pp_cell_overflows [N_PP],
  output logic [15:0]       pp_overflow_hits  [N_PP],
  output logic [15:0]       pp_drops          [N_PP],
  output logic [15:0]       pp_discards       [N_PP],
  output logic [15:0]       sl_cell_overflows,
  output logic [15:0]       sl_overflow_hits,
  output logic [15:0]       sl_drops,
  output logic [15:0]       sl_discards,
  output logic [15:0]       itel_tag_errors
);
  logic [3:0] pp_valid, pp_ready;
  rich_word_t pp_word [4];

  for (genvar i = 0; i < 4; i++) begin : g_pp
    if (i < N_PP) begin : g_on
      pp_chain #(.N_ROWS(N_ROWS), .N_CELLS(N_CELLS), .MUL_LAT(MUL_LAT)) u_pp (
        .clk, .rst_n, .window, .mult_min, .mult_max,
        .tdc_valid (tdc_valid[i]), .tdc_ready (tdc_ready[i]),
        .tdc_mark  (tdc_mark[i]),  .tdc_time  (tdc_time[i]),
        .out_valid (pp_valid[i]),  .out_ready (pp_ready[i]), .out_word (pp_word[i]),
        .cell_overflows (pp_cell_overflows[i]), .overflow_hits (pp_overflow_hits[i]),
        .drops (pp_drops[i]), .discards (pp_discards[i])
      );
    end else begin : g_off
      assign pp_valid[i] = 1'b0;
      assign pp_word[i]  = '0;
    end
  end

  logic       rx_valid, rx_ready;
  rich_word_t rx_word;
  intertel_rx u_rx (.clk, .rst_n,
    .bus_valid (itel_in_valid), .bus_data (itel_in_data), .bus_ready (itel_in_ready),
    .out_valid (rx_valid), .out_ready (rx_ready), .out_word (rx_word),
    .tag_errors (itel_tag_errors));

  logic       sl_valid, sl_ready, tx_ready;
  rich_word_t sl_word;
  sl_chain #(.N_ROWS(N_ROWS), .N_CELLS(N_CELLS), .MUL_LAT(MUL_LAT)) u_sl (
    .clk, .rst_n, .window, .mult_min, .mult_max, .intertel_en,
    .in_valid (pp_valid), .in_ready (pp_ready), .in_word (pp_word),
    .itel_valid (rx_valid), .itel_ready (rx_ready), .itel_word (rx_word),
    .out_valid (sl_valid), .out_ready (sl_ready), .out_word (sl_word),
    .cell_overflows (sl_cell_overflows), .overflow_hits (sl_overflow_hits),
    .drops (sl_drops), .discards (sl_discards)
  );

  intertel_tx u_tx (.clk, .rst_n,
    .in_valid (sl_valid && !last_board), .in_ready (tx_ready), .in_word (sl_word),
    .bus_valid (itel_out_valid), .bus_data (itel_out_data), .bus_ready (itel_out_ready));

  assign prim_valid = sl_valid && last_board;
  assign prim_word  = sl_word;
  assign sl_ready   = last_board ? prim_ready : tx_ready;
endmodule
