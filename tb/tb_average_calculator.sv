// tb_average_calculator: random RICH words (timestamp words, speed data and
// clusters with random N and signed CTS, fine times near both ends of the
// timestamp) go through the average calculator under random back-pressure.
// Each output must equal the input with fine = fine + CTS/N (truncated toward
// zero, kept inside 0..4095) and CTS = 0; other words pass unchanged. The
// one-cycle latency is checked with the output always ready.
module tb_average_calculator;
  import tb_rich_pkg::*;
  import rich_pkg::rich_word_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  rich_word_t in_word, out_word;

  average_calculator dut (.clk, .rst_n, .in_valid, .in_ready, .in_word, .out_valid, .out_ready, .out_word);

  int checks = 0, failures = 0;
  bit [31:0] stim[$], exp[$], got[$];
  bit bp = 1;

  initial begin
    bit fire_in;
    in_valid = 0; in_word = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      in_valid = rst_n && stim.size() > 0 && (!bp || $urandom_range(0, 3) != 0);
      if (stim.size() > 0) in_word = stim[0];
      out_ready = !bp || ($urandom_range(0, 2) != 0);
      #1;
      fire_in = in_valid && in_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      automatic int k = $urandom_range(0, 9);
      if (k == 0) begin
        stim.push_back(ts_word($urandom())); exp.push_back(stim[$]);
      end else if (k == 1) begin
        stim.push_back(data_word(0, 0, 0)); exp.push_back(stim[$]);
      end else begin
        automatic int n = $urandom_range(1, 255), c = $urandom_range(0, 255) - 128;
        automatic int f = (k == 2) ? $urandom_range(0, 20) : (k == 3) ? $urandom_range(4075, 4095) : $urandom_range(0, 4095);
        automatic int q = c / n, t = f + q;
        if (k == 4) n = $urandom_range(1, 3);
        q = c / n; t = f + q;
        stim.push_back(data_word(n, c, f));
        exp.push_back(data_word(n, 0, t < 0 ? 0 : (t > 4095 ? 4095 : t)));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (10) @(posedge clk);
    checks++; if (got.size() != exp.size()) begin failures++; $display("got %0d expected %0d", got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) begin
        failures++;
        if (failures < 5) $display("word %0d: got %h expected %h", i, i < got.size() ? got[i] : 0, exp[i]);
      end
    end
    // latency: one cycle
    begin
      int lat = 0;
      bp = 0;
      stim.push_back(data_word(4, 8, 100));
      @(posedge clk);
      while (!out_valid) begin @(posedge clk); lat++; end
      checks++; if (lat > 1 || out_word != data_word(4, 0, 102)) begin failures++; $display("latency %0d word %h", lat, out_word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
