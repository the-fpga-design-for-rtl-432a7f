// pp_chain: trigger path of one pre-processing FPGA. TDC hits are written in
// the RICH format by the data converter, grouped into pre-clusters by the
// clustering module and given an averaged time (and a cleared time-sum) by the
// average calculator. Output: RICH stream sorted in 25 ns frames, ready for
// the sync-link merger. All interfaces are valid/ready; one word per cycle.
// The order of the three stages follows the design.
module pp_chain
  import rich_pkg::*;
#(
  parameter int unsigned N_ROWS  = 16,
  parameter int unsigned N_CELLS = 4,
  parameter int unsigned MUL_LAT = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        window,
  input  logic [N_W-1:0]    mult_min,
  input  logic [N_W-1:0]    mult_max,
  input  logic              tdc_valid,
  output logic              tdc_ready,
  input  logic              tdc_mark,
  input  logic [TIME_W-1:0] tdc_time,
  output logic              out_valid,
  input  logic              out_ready,
  output rich_word_t        out_word,
  output logic [15:0]       cell_overflows,
  output logic [15:0]       overflow_hits,
  output logic [15:0]       drops,
  output logic [15:0]       discards
);
  logic       cv_valid, cv_ready, cl_valid, cl_ready;
  rich_word_t cv_word, cl_word;
  logic [15:0] conv_late, cl_drops;

  data_converter u_conv (
    .clk, .rst_n, .tdc_valid, .tdc_ready, .tdc_mark, .tdc_time,
    .out_valid (cv_valid), .out_ready (cv_ready), .out_word (cv_word),
    .late_drops (conv_late)
  );

  clustering_module #(.N_ROWS(N_ROWS), .N_CELLS(N_CELLS), .MUL_LAT(MUL_LAT)) u_clu (
    .clk, .rst_n, .window, .mult_min, .mult_max,
    .in_valid (cv_valid), .in_ready (cv_ready), .in_word (cv_word),
    .out_valid (cl_valid), .out_ready (cl_ready), .out_word (cl_word),
    .cell_overflows, .overflow_hits, .drops (cl_drops), .discards
  );

  average_calculator u_avg (
    .clk, .rst_n,
    .in_valid (cl_valid), .in_ready (cl_ready), .in_word (cl_word),
    .out_valid, .out_ready, .out_word
  );

  always_comb begin
    logic [16:0] s;
    s = 17'(conv_late) + 17'(cl_drops);
    drops = s[16] ? 16'hFFFF : s[15:0];
  end
endmodule
