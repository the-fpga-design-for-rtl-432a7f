// sl_chain: trigger path of the sync-link FPGA. The RICH streams of the four
// pre-processing FPGAs are merged by a tree of two-input data mergers
// ((0,1), (2,3), then the two results); when intertel_en is set a fourth
// merger adds the stream received from the upstream board over InterTEL,
// otherwise that merger is bypassed. The merged stream is clustered again by
// the same clustering module as in the PPs and the average calculator gives
// each cluster its reference time: these are the primitives.
// valid/ready everywhere; one word per cycle. The merger tree shape and the
// bypass are this implementation's reading of the design's block diagram.
module sl_chain
  import rich_pkg::*;
#(
  parameter int unsigned N_ROWS  = 16,
  parameter int unsigned N_CELLS = 4,
  parameter int unsigned MUL_LAT = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [7:0]     window,
  input  logic [N_W-1:0] mult_min,
  input  logic [N_W-1:0] mult_max,
  input  logic           intertel_en,
  input  logic [3:0]     in_valid,
  output logic [3:0]     in_ready,
  input  rich_word_t     in_word [4],
  input  logic           itel_valid,
  output logic           itel_ready,
  input  rich_word_t     itel_word,
  output logic           out_valid,
  input  logic           out_ready,
  output rich_word_t     out_word,
  output logic [15:0]    cell_overflows,
  output logic [15:0]    overflow_hits,
  output logic [15:0]    drops,
  output logic [15:0]    discards
);
  logic       m0_v, m0_r, m1_v, m1_r, m2_v, m2_r, m3_v, m3_r, c_v, c_r, a_v, a_r;
  rich_word_t m0_w, m1_w, m2_w, m3_w, c_w, a_w;
  logic       m3_a_ready, m3_b_valid;

  data_merger u_m0 (.clk, .rst_n,
    .a_valid (in_valid[0]), .a_ready (in_ready[0]), .a_word (in_word[0]),
    .b_valid (in_valid[1]), .b_ready (in_ready[1]), .b_word (in_word[1]),
    .out_valid (m0_v), .out_ready (m0_r), .out_word (m0_w));
  data_merger u_m1 (.clk, .rst_n,
    .a_valid (in_valid[2]), .a_ready (in_ready[2]), .a_word (in_word[2]),
    .b_valid (in_valid[3]), .b_ready (in_ready[3]), .b_word (in_word[3]),
    .out_valid (m1_v), .out_ready (m1_r), .out_word (m1_w));
  data_merger u_m2 (.clk, .rst_n,
    .a_valid (m0_v), .a_ready (m0_r), .a_word (m0_w),
    .b_valid (m1_v), .b_ready (m1_r), .b_word (m1_w),
    .out_valid (m2_v), .out_ready (m2_r), .out_word (m2_w));

  // InterTEL merger, used only when the board receives an upstream stream
  assign m3_b_valid = intertel_en && itel_valid;
  data_merger u_m3 (.clk, .rst_n,
    .a_valid (intertel_en && m2_v), .a_ready (m3_a_ready), .a_word (m2_w),
    .b_valid (m3_b_valid), .b_ready (itel_ready), .b_word (itel_word),
    .out_valid (m3_v), .out_ready (m3_r), .out_word (m3_w));

  assign m2_r = intertel_en ? m3_a_ready : c_r;
  assign m3_r = c_r;
  assign c_v  = intertel_en ? m3_v : m2_v;
  assign c_w  = intertel_en ? m3_w : m2_w;

  logic       k_v, k_r;
  rich_word_t k_w;
  clustering_module #(.N_ROWS(N_ROWS), .N_CELLS(N_CELLS), .MUL_LAT(MUL_LAT)) u_clu (
    .clk, .rst_n, .window, .mult_min, .mult_max,
    .in_valid (c_v), .in_ready (c_r), .in_word (c_w),
    .out_valid (k_v), .out_ready (k_r), .out_word (k_w),
    .cell_overflows, .overflow_hits, .drops, .discards
  );

  average_calculator u_avg (.clk, .rst_n,
    .in_valid (k_v), .in_ready (k_r), .in_word (k_w),
    .out_valid (a_v), .out_ready (a_r), .out_word (a_w));

  assign out_valid = a_v;
  assign a_r       = out_ready;
  assign out_word  = a_w;
endmodule
