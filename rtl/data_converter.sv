// data_converter: first stage of a pre-processing FPGA. It reads the hits of a
// TDC board and writes them in the RICH format, each hit as a one-hit cluster
// (nhits = 1, cts = 0) whose fine time is the low 12 bits of the 40-bit TDC
// time (100 ps units) and whose timestamp word carries the upper 28 bits
// (400 ns units). Every 400 ns timestamp appears in the output, 16 per 6.4 us
// time slot: a timestamp with no hit gets a speed-data word.
//
// Input: one item per cycle, valid/ready. tdc_mark = 0 is a hit at tdc_time;
// tdc_mark = 1 says that the read-out has reached the timestamp of tdc_time
// (all earlier hits delivered), which is how an empty timestamp becomes known.
// Hits must come ordered by 25 ns frame, as the TDC read-out delivers them;
// inside a frame they may be in any order. The interface to the TDC board and
// the marker are this implementation's choice; the conversion follows the
// design. Latency: one cycle, plus two cycles per timestamp opened.
module data_converter
  import rich_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tdc_valid,
  output logic              tdc_ready,
  input  logic              tdc_mark,
  input  logic [TIME_W-1:0] tdc_time,
  output logic              out_valid,
  input  logic              out_ready,
  output rich_word_t        out_word,
  output logic [15:0]       late_drops
);
  rich_item_t item;

  always_comb begin
    item.is_data = !tdc_mark;
    item.ts      = tdc_time[TIME_W-1:FINE_W];
    item.fine    = tdc_time[FINE_W-1:0];
    item.n       = N_W'(1);
    item.cts     = '0;
  end

  rich_formatter u_fmt (
    .clk, .rst_n,
    .in_valid (tdc_valid),
    .in_ready (tdc_ready),
    .in_item  (item),
    .out_valid, .out_ready, .out_word, .late_drops
  );
endmodule
