// tb_sl_chain: the sync-link chain fed with four random pre-cluster streams
// (frame-sorted clusters of 1..6 hits, empty timestamps with speed data) and,
// in a second run, an InterTEL stream as well (intertel_en = 1). Output under
// random back-pressure; expected clusters: the merger tree
// ((0,1),(2,3)) [+ InterTEL], then cluster_model with window 10 and kept
// multiplicity [2, 20], then avg_model.
module tb_sl_chain;
  import tb_rich_pkg::*;
  import rich_pkg::rich_word_t;

  localparam int NT = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic intertel_en;
  logic [3:0] in_valid, in_ready;
  rich_word_t in_word [4];
  logic itel_valid, itel_ready, out_valid, out_ready;
  rich_word_t itel_word, out_word;
  logic [15:0] cell_ovf, ovf_hits, drops, discards;

  sl_chain dut (.clk, .rst_n, .window (8'd10), .mult_min (8'd2), .mult_max (8'd20), .intertel_en,
    .in_valid, .in_ready, .in_word, .itel_valid, .itel_ready, .itel_word,
    .out_valid, .out_ready, .out_word,
    .cell_overflows (cell_ovf), .overflow_hits (ovf_hits), .drops, .discards);

  int checks = 0, failures = 0;
  bit [31:0] s [5][$];
  bit [31:0] got[$];

  function automatic void build(ref bit [31:0] q[$], input longint t0);
    for (longint t = t0; t < t0 + NT + 4; t++) begin
      int f[$];
      q.push_back(ts_word(t));
      if (t < t0 + NT) for (int k = 0; k < $urandom_range(0, 5); k++) f.push_back($urandom_range(0, 4095));
      f.sort();
      foreach (f[i]) q.push_back(data_word($urandom_range(1, 6), 0, f[i]));
      if (f.size() == 0) q.push_back(data_word(0, 0, 0));
    end
  endfunction

  initial begin
    bit [4:0] fire;
    in_valid = '0; itel_valid = 0; out_ready = 0; itel_word = '0;
    for (int i = 0; i < 4; i++) in_word[i] = '0;
    forever begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        in_valid[i] = rst_n && s[i].size() > 0 && ($urandom_range(0, 2) != 0);
        if (s[i].size() > 0) in_word[i] = s[i][0];
      end
      itel_valid = rst_n && intertel_en && s[4].size() > 0 && ($urandom_range(0, 2) != 0);
      if (s[4].size() > 0) itel_word = s[4][0];
      out_ready = $urandom_range(0, 4) != 0;
      #1;
      for (int i = 0; i < 4; i++) fire[i] = in_valid[i] && in_ready[i];
      fire[4] = itel_valid && itel_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      for (int i = 0; i < 5; i++) if (fire[i]) void'(s[i].pop_front());
    end
  end

  task automatic run(bit itel, longint t0);
    cl_q_t q[5], m, exp, res;
    int e = 0, n = 0, bad, eo = 0, ec = 0, ed = 0;
    rst_n = 0;
    intertel_en = itel;
    got.delete();
    for (int i = 0; i < 5; i++) begin
      s[i].delete();
      if (i < 4 || itel) build(s[i], t0);
      q[i] = parse_stream(s[i], e, n);
    end
    m = merge_model(merge_model(q[0], q[1]), merge_model(q[2], q[3]));
    if (itel) m = merge_model(m, q[4]);
    exp = avg_model(cluster_model(no_speed(m), 10, 2, 20, 4, eo, ec, ed));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (s[0].size() == 0 && s[1].size() == 0 && s[2].size() == 0 && s[3].size() == 0 && s[4].size() == 0);
    repeat (3000) @(posedge clk);
    res = parse_stream(got, e, n);
    checks++; if (e != 0) begin failures++; $display("format errors %0d", e); end
    bad = compare(before_ts(no_speed(res), t0 + NT), before_ts(exp, t0 + NT), itel ? "sl+intertel" : "sl");
    checks++; if (bad != 0) failures++;
    checks++; if (discards != 16'(ed) || drops != 0) begin failures++; $display("discards %0d/%0d drops %0d", discards, ed, drops); end
    $display("intertel=%0d clusters %0d overflow hits %0d discards %0d", itel, exp.size(), ovf_hits, discards);
  endtask

  initial begin
    run(0, 3000);
    run(1, 5000);
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
