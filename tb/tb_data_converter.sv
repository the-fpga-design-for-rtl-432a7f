// tb_data_converter: directed test of the data converter. TDC hits and
// "timestamp reached" markers go in; the RICH stream must carry each hit as a
// one-hit cluster (nhits = 1, cts = 0) with its 12-bit fine time under the
// timestamp word of its upper 28 bits, and every timestamp in between,
// empty ones with speed data. Random back-pressure on the output.
module tb_data_converter;
  import tb_rich_pkg::*;
  import rich_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tdc_valid, tdc_ready, tdc_mark, out_valid, out_ready;
  logic [39:0] tdc_time;
  rich_word_t out_word;
  logic [15:0] late;

  data_converter dut (.clk, .rst_n, .tdc_valid, .tdc_ready, .tdc_mark, .tdc_time,
                      .out_valid, .out_ready, .out_word, .late_drops (late));

  int checks = 0, failures = 0;
  bit [40:0] stim[$];  // {mark, time}
  bit [31:0] got[$], exp[$];

  initial begin
    bit fire_in;
    tdc_valid = 0; tdc_mark = 0; tdc_time = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      tdc_valid = rst_n && stim.size() > 0 && ($urandom_range(0, 3) != 0);
      if (stim.size() > 0) {tdc_mark, tdc_time} = stim[0];
      out_ready = $urandom_range(0, 2) != 0;
      #1;
      fire_in = tdc_valid && tdc_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  function automatic bit [40:0] hit(longint ts, int fine);
    return {1'b0, 28'(ts), 12'(fine)};
  endfunction
  function automatic bit [40:0] mark(longint ts);
    return {1'b1, 28'(ts), 12'd0};
  endfunction

  initial begin
    longint b = 28'h0ABCDEF;
    stim = '{mark(b), hit(b, 50), hit(b, 300), hit(b, 290), hit(b + 2, 7), mark(b + 3),
             mark(b + 4), hit(b + 4, 4095), hit(b + 1, 5), mark(b + 6)};
    exp = '{ts_word(b), data_word(1, 0, 50), data_word(1, 0, 300), data_word(1, 0, 290),
            ts_word(b + 1), data_word(0, 0, 0), ts_word(b + 2), data_word(1, 0, 7),
            ts_word(b + 3), data_word(0, 0, 0), ts_word(b + 4), data_word(1, 0, 4095),
            ts_word(b + 5), data_word(0, 0, 0), ts_word(b + 6)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (30) @(posedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("got %0d words, expected %0d", got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) begin
        failures++; $display("word %0d: got %h expected %h", i, i < got.size() ? got[i] : 0, exp[i]);
      end
    end
    checks++; if (late != 16'd1) begin failures++; $display("late_drops %0d", late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
