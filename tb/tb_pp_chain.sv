// tb_pp_chain: end-to-end test of one pre-processing chain. Random TDC hits
// (tb_rich_pkg::gen_hits) and a "timestamp reached" marker for every
// timestamp without hits go in with random gaps; the output, under random
// back-pressure, must be a valid RICH stream whose clusters equal
// avg_model(cluster_model(hits)): hits clustered with window 10, clusters
// outside [1, 12] hits removed, times averaged.
module tb_pp_chain;
  import tb_rich_pkg::*;
  import rich_pkg::rich_word_t;

  localparam int NT = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tdc_valid, tdc_ready, tdc_mark, out_valid, out_ready;
  logic [39:0] tdc_time;
  rich_word_t out_word;
  logic [15:0] cell_ovf, ovf_hits, drops, discards;

  pp_chain dut (.clk, .rst_n, .window (8'd10), .mult_min (8'd1), .mult_max (8'd12),
    .tdc_valid, .tdc_ready, .tdc_mark, .tdc_time, .out_valid, .out_ready, .out_word,
    .cell_overflows (cell_ovf), .overflow_hits (ovf_hits), .drops, .discards);

  int checks = 0, failures = 0;
  bit [40:0] stim[$];
  bit [31:0] got[$];

  initial begin
    bit fire_in;
    tdc_valid = 0; tdc_mark = 0; tdc_time = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      tdc_valid = rst_n && stim.size() > 0 && ($urandom_range(0, 3) != 0);
      if (stim.size() > 0) {tdc_mark, tdc_time} = stim[0];
      out_ready = $urandom_range(0, 4) != 0;
      #1;
      fire_in = tdc_valid && tdc_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  initial begin
    cl_q_t hits, exp, res;
    int e = 0, n = 0, bad, eo = 0, ec = 0, ed = 0;
    longint t0 = 28'h0FFFFF0;
    hits = gen_hits(t0, NT, 4);
    for (longint t = t0; t < t0 + NT + 4; t++) begin
      int any;
      any = 0;
      foreach (hits[i]) if (hits[i].ts == t) begin
        stim.push_back({1'b0, 28'(t), 12'(hits[i].fine)});
        any = 1;
      end
      if (!any) stim.push_back({1'b1, 28'(t), 12'd0});
    end
    exp = avg_model(cluster_model(hits, 10, 1, 12, 4, eo, ec, ed));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (3000) @(posedge clk);
    res = parse_stream(got, e, n);
    checks++; if (e != 0) begin failures++; $display("format errors %0d", e); end
    bad = compare(before_ts(no_speed(res), t0 + NT), before_ts(exp, t0 + NT), "pp");
    checks++; if (bad != 0) failures++;
    checks++; if (ovf_hits != 16'(eo) || cell_ovf != 16'(ec) || discards != 16'(ed) || drops != 0) begin
      failures++; $display("counters %0d/%0d %0d/%0d %0d/%0d drops %0d", ovf_hits, eo, cell_ovf, ec, discards, ed, drops);
    end
    $display("hits %0d clusters %0d timestamps %0d", hits.size(), exp.size(), n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
