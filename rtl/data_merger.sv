// data_merger: merges two RICH streams (for instance two pre-processing FPGAs)
// into one. Each source goes into its own input FIFO. Timestamp words are
// taken from a FIFO as soon as they reach its head and only update that
// source's current timestamp. A data word is chosen only when both FIFOs are
// non-empty and both heads are data words, which keeps the output ordered;
// the one with the earlier 25 ns frame ({timestamp, fine[11:8]}) goes first,
// source A on a tie. So the output is sorted in 25 ns frames, like the input
// of a pre-processing FPGA, and clustering can run on it again. The chosen
// word goes through rich_formatter, which writes each timestamp word once and
// speed data only for timestamps that have no cluster at all: speed data of
// the sources only advance time and are not copied.
// The price of the ordering rule is that a source that delivers nothing stops
// the merger; every source must therefore write every timestamp (speed data).
// Selection is combinational, the output is a register; one word per cycle.
// Waiting for both FIFOs and the output format follow the design; the FIFO
// depth is this implementation's choice.
module data_merger
  import rich_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_valid,
  output logic       a_ready,
  input  rich_word_t a_word,
  input  logic       b_valid,
  output logic       b_ready,
  input  rich_word_t b_word,
  output logic       out_valid,
  input  logic       out_ready,
  output rich_word_t out_word
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  rich_word_t      ha, hb;
  logic            ea, eb, fa, fb, pop_a, pop_b;
  logic [CW-1:0]   ca, cb;
  logic [TS_W-1:0] ts_a, ts_b;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fa (
    .clk, .rst_n, .push (a_valid && !fa), .wdata (a_word), .pop (pop_a),
    .rdata (ha), .full (fa), .empty (ea), .count (ca));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fb (
    .clk, .rst_n, .push (b_valid && !fb), .wdata (b_word), .pop (pop_b),
    .rdata (hb), .full (fb), .empty (eb), .count (cb));
  assign a_ready = !fa;
  assign b_ready = !fb;

  logic               ts_head_a, ts_head_b, both_data, pick_a;
  logic [FRAME_W-1:0] frm_a, frm_b;
  rich_word_t         sel;
  logic [TS_W-1:0]    sel_ts;
  rich_item_t         item;
  logic               item_ready;

  assign ts_head_a = !ea && is_ts_word(ha);
  assign ts_head_b = !eb && is_ts_word(hb);
  assign both_data = !ea && !eb && !is_ts_word(ha) && !is_ts_word(hb);
  assign frm_a     = {ts_a, fine_of(ha)[11:8]};
  assign frm_b     = {ts_b, fine_of(hb)[11:8]};
  assign pick_a    = frm_a <= frm_b;
  assign sel       = pick_a ? ha : hb;
  assign sel_ts    = pick_a ? ts_a : ts_b;

  always_comb begin
    item.is_data = n_of(sel) != '0;
    item.ts      = sel_ts;
    item.fine    = fine_of(sel);
    item.n       = n_of(sel);
    item.cts     = cts_of(sel);
  end

  assign pop_a = ts_head_a || (both_data && pick_a && item_ready);
  assign pop_b = ts_head_b || (both_data && !pick_a && item_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_a <= '0;
      ts_b <= '0;
    end else begin
      if (ts_head_a) ts_a <= ts_of(ha);
      if (ts_head_b) ts_b <= ts_of(hb);
    end
  end

  logic [15:0] late_unused;
  rich_formatter u_fmt (
    .clk, .rst_n,
    .in_valid  (both_data),
    .in_ready  (item_ready),
    .in_item   (item),
    .out_valid, .out_ready, .out_word,
    .late_drops (late_unused)
  );
endmodule
