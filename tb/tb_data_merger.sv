// tb_data_merger: two random RICH streams (frame-sorted clusters, empty
// timestamps with speed data) are fed with random gaps, one of them much
// sparser so the merger often waits for a FIFO to fill. The output must be a
// valid RICH stream whose clusters are the frame-ordered merge of both
// inputs (tb_rich_pkg::merge_model), with no speed data in a timestamp that
// has clusters and no repeated timestamp word.
module tb_data_merger;
  import tb_rich_pkg::*;
  import rich_pkg::rich_word_t;

  localparam int NT = 80;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;
  rich_word_t a_word, b_word, out_word;

  data_merger dut (.clk, .rst_n, .a_valid, .a_ready, .a_word, .b_valid, .b_ready, .b_word,
                   .out_valid, .out_ready, .out_word);

  int checks = 0, failures = 0, waits = 0;
  bit [31:0] sa[$], sb[$], got[$];

  task automatic build(ref bit [31:0] s[$], input longint t0, input int density);
    for (longint t = t0; t < t0 + NT + 3; t++) begin
      int f[$];
      s.push_back(ts_word(t));
      if (t < t0 + NT) for (int k = 0; k < $urandom_range(0, density); k++) f.push_back($urandom_range(0, 4095));
      f.sort();
      foreach (f[i]) s.push_back(data_word($urandom_range(1, 9), $urandom_range(0, 255) - 128, f[i]));
      if (f.size() == 0) s.push_back(data_word(0, 0, 0));
    end
  endtask

  initial begin
    bit fa, fb;
    a_valid = 0; b_valid = 0; a_word = '0; b_word = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      a_valid = rst_n && sa.size() > 0 && ($urandom_range(0, 3) != 0);
      if (sa.size() > 0) a_word = sa[0];
      b_valid = rst_n && sb.size() > 0 && ($urandom_range(0, 5) == 0);
      if (sb.size() > 0) b_word = sb[0];
      out_ready = $urandom_range(0, 3) != 0;
      #1;
      fa = a_valid && a_ready;
      fb = b_valid && b_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      if (dut.ea != dut.eb) waits++;
      @(posedge clk);
      if (fa) void'(sa.pop_front());
      if (fb) void'(sb.pop_front());
    end
  end

  initial begin
    cl_q_t qa, qb, res, exp;
    int e = 0, n = 0, bad;
    longint t0 = 500;
    build(sa, t0, 6);
    build(sb, t0, 3);
    qa = parse_stream(sa, e, n);
    qb = parse_stream(sb, e, n);
    checks++; if (e != 0) begin failures++; $display("stimulus format"); end
    exp = merge_model(qa, qb);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sa.size() == 0 && sb.size() == 0);
    repeat (100) @(posedge clk);
    res = parse_stream(got, e, n);
    checks++; if (e != 0) begin failures++; $display("output format errors %0d", e); end
    bad = compare(before_ts(no_speed(res), t0 + NT), before_ts(no_speed(exp), t0 + NT), "merged");
    checks++; if (bad != 0) failures++;
    // speed data only in timestamps without clusters
    begin
      int sp = 0;
      foreach (res[i]) if (res[i].n == 0) foreach (res[j]) if (res[j].ts == res[i].ts && res[j].n != 0) sp++;
      checks++; if (sp != 0) begin failures++; $display("speed data repeated in %0d timestamps", sp); end
    end
    $display("merged %0d clusters, cycles with one FIFO empty: %0d", no_speed(res).size(), waits);
    checks++; if (waits == 0) begin failures++; $display("merger never waited"); end
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
