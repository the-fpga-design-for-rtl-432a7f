// average_calculator: last stage of the PP and SL trigger paths. For every
// cluster data word it moves the time from the seed to the cluster average,
//   fine_new = fine + CTS / N,   N unchanged,   CTS_new = 0,
// where CTS = sum N_i (t_i - seed) is the cluster time-sum built by the
// clustering cells. In the PPs this gives pre-clusters with a better time and
// a cleared CTS, so the time-sum cannot overflow in the sync-link clustering;
// in the sync link it gives the reference time of the primitive.
// Timestamp words and speed data pass unchanged. Division truncates toward
// zero, and the new fine time is clamped to the word's own 400 ns timestamp
// (0..4095) so no timestamp word has to change: both are this
// implementation's choices. Latency one cycle, one word per cycle,
// valid/ready handshake with a register on the output.
module average_calculator
  import rich_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  rich_word_t in_word,
  output logic       out_valid,
  input  logic       out_ready,
  output rich_word_t out_word
);
  logic                     can_go;
  logic signed [CTSF_W:0]   q;
  logic signed [FINE_W+1:0] t;
  logic [FINE_W-1:0]        fine_new;
  rich_word_t               w;

  assign can_go   = !out_valid || out_ready;
  assign in_ready = can_go;

  always_comb begin
    q = '0;
    if (n_of(in_word) != '0)
      q = (CTSF_W+1)'($signed({cts_of(in_word)[CTSF_W-1], cts_of(in_word)}) /
                      $signed({1'b0, n_of(in_word)}));
    t = $signed({2'b00, fine_of(in_word)}) + (FINE_W+2)'(q);
    if (t < 0)                           fine_new = '0;
    else if (t > (FINE_W+2)'(4095))      fine_new = '1;
    else                                 fine_new = t[FINE_W-1:0];
    if (is_ts_word(in_word) || n_of(in_word) == '0) w = in_word;
    else w = make_data_word(n_of(in_word), '0, fine_new);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else if (can_go) begin
      out_valid <= in_valid;
      if (in_valid) out_word <= w;
    end
  end
endmodule
