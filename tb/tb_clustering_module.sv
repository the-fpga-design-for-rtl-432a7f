// tb_clustering_module: self-checking test of the clustering module.
// A random RICH stream is built: 400 ns timestamps holding 25 ns frames with
// groups of hits (closer than the window), lone hits, hits just after a frame
// boundary (overflow into the previous row), frames with more than four
// separate clusters (cell overflow), large groups (multiplicity discard) and
// empty timestamps (speed data). Hits are shuffled inside their frame, as the
// read-out only orders 25 ns frames. The output clusters are compared with
// tb_rich_pkg::cluster_model, the stream format is checked, and each
// mechanism must occur. A second phase sends four hits per frame back to back
// with the output always ready and checks one word per cycle throughput.
module tb_clustering_module;
  import tb_rich_pkg::*;
  import rich_pkg::rich_word_t;

  localparam int W = 10, MMIN = 1, MMAX = 12, NT = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  rich_word_t in_word, out_word;
  logic [15:0] cell_ovf, ovf_hits, drops, discards;

  clustering_module dut (
    .clk, .rst_n, .window (8'(W)), .mult_min (8'(MMIN)), .mult_max (8'(MMAX)),
    .in_valid, .in_ready, .in_word, .out_valid, .out_ready, .out_word,
    .cell_overflows (cell_ovf), .overflow_hits (ovf_hits), .drops, .discards);

  int checks = 0, failures = 0;
  bit [31:0] stim[$], got[$];
  cl_q_t model_in;
  bit phase2 = 0;

  function automatic void add_hit(ref cl_t fr[$], input longint ts, int frame, int f);
    cl_t c;
    c.ts = ts; c.fine = frame * 256 + f; c.n = 1; c.cts = 0;
    fr.push_back(c);
  endfunction

  task automatic build(longint t0, int nt, bit dense);
    for (longint t = t0; t < t0 + nt; t++) begin
      int nh = 0;
      stim.push_back(ts_word(t));
      for (int fr = 0; fr < 16; fr++) begin
        cl_t h[$];
        int kind = $urandom_range(0, 9);
        if (dense) begin
          for (int k = 0; k < 4; k++) add_hit(h, t, fr, 20 + 60 * k + $urandom_range(0, 3));
        end else if (kind < 3) begin
          // one or two groups
          for (int g = 0; g < $urandom_range(1, 2); g++) begin
            int c = $urandom_range(20, 230);
            for (int k = 0; k < $urandom_range(1, 5); k++) add_hit(h, t, fr, c + $urandom_range(0, 5));
          end
        end else if (kind == 3) begin
          // hits at both sides of the boundary to the next frame
          add_hit(h, t, fr, 250 + $urandom_range(0, 5));
        end else if (kind == 4) begin
          add_hit(h, t, fr, $urandom_range(0, 9));
          add_hit(h, t, fr, 120);
        end else if (kind == 5) begin
          // more than four separate clusters
          for (int k = 0; k < 6; k++) add_hit(h, t, fr, 10 + 40 * k);
        end else if (kind == 6 && $urandom_range(0, 3) == 0) begin
          for (int k = 0; k < 14; k++) add_hit(h, t, fr, 100 + $urandom_range(0, 4));
        end
        h.shuffle();
        foreach (h[i]) begin
          stim.push_back(data_word(1, 0, h[i].fine));
          model_in.push_back(h[i]);
          nh++;
        end
      end
      if (nh == 0) stim.push_back(data_word(0, 0, 0));
    end
  endtask

  task automatic trailer(longint t0);
    for (longint t = t0; t < t0 + 4; t++) begin
      stim.push_back(ts_word(t));
      stim.push_back(data_word(0, 0, 0));
    end
  endtask

  // driver and monitor: inputs change at the falling edge, and the handshake
  // is decided just after it, so it is the one the rising edge will see
  initial begin
    bit fire_in;
    in_valid = 0; in_word = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      if (stim.size() > 0 && rst_n) begin
        in_valid = phase2 ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_word  = stim[0];
      end else in_valid = 1'b0;
      out_ready = phase2 ? 1'b1 : ($urandom_range(0, 4) != 0);
      #1;
      fire_in = in_valid && in_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  initial begin
    int errors = 0, nts = 0, e_ovf = 0, e_cell = 0, e_disc = 0, bad;
    cl_q_t exp, res;
    longint t0 = 1000;
    build(t0, NT, 0);
    trailer(t0 + NT);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (3000) @(posedge clk);
    exp = cluster_model(model_in, W, MMIN, MMAX, 4, e_ovf, e_cell, e_disc);
    res = parse_stream(got, errors, nts);
    checks++; if (errors != 0) begin failures++; $display("format errors %0d", errors); end
    checks++; if (nts < NT + 2) begin failures++; $display("only %0d timestamps", nts); end
    bad = compare(before_ts(no_speed(res), t0 + NT), before_ts(exp, t0 + NT), "clusters");
    checks++; if (bad != 0) failures++;
    $display("clusters=%0d overflow_hits=%0d cell_overflows=%0d discards=%0d drops=%0d",
             exp.size(), ovf_hits, cell_ovf, discards, drops);
    checks++; if (ovf_hits != 16'(e_ovf) || ovf_hits == 0) begin failures++; $display("overflow hits %0d vs %0d", ovf_hits, e_ovf); end
    checks++; if (cell_ovf != 16'(e_cell) || cell_ovf == 0) begin failures++; $display("cell overflows %0d vs %0d", cell_ovf, e_cell); end
    checks++; if (discards != 16'(e_disc) || discards == 0) begin failures++; $display("discards %0d vs %0d", discards, e_disc); end
    checks++; if (drops != 0) begin failures++; $display("drops %0d (%0d %0d %0d)", drops, dut.dist_late, dut.pos_drops, dut.fmt_late); end

    // phase 2: throughput, 4 hits per 25 ns frame back to back
    begin
      int n_in, cyc = 0, n_out0;
      got.delete(); model_in.delete();
      phase2 = 1;
      build(t0 + NT + 10, 8, 1);
      trailer(t0 + NT + 18);
      n_in = stim.size();
      while (stim.size() > 0) begin @(posedge clk); cyc++; end
      $display("throughput: %0d words in %0d cycles", n_in, cyc);
      checks++; if (cyc > n_in + n_in / 10) begin failures++; $display("throughput below one word per cycle"); end
      repeat (200) @(posedge clk);
      e_ovf = 0; e_cell = 0; e_disc = 0;
      exp = cluster_model(model_in, W, MMIN, MMAX, 4, e_ovf, e_cell, e_disc);
      res = parse_stream(got, errors, nts);
      n_out0 = compare(before_ts(no_speed(res), t0 + NT + 18), before_ts(exp, t0 + NT + 18), "dense");
      checks++; if (n_out0 != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
