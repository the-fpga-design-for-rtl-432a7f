// tb_rich_formatter: directed test of the RICH formatter. A fixed item
// sequence covers: the first timestamp, a cluster, a gap of one empty
// timestamp (filled with timestamp + speed data), a marker that is not ahead
// (no output), a late cluster (dropped and counted), a marker that opens a
// new timestamp, and a timestamp closed with speed data. The output is
// checked word by word against a hand-written list, under random
// back-pressure, and one word per cycle is checked with the output ready.
module tb_rich_formatter;
  import tb_rich_pkg::*;
  import rich_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  rich_item_t in_item;
  rich_word_t out_word;
  logic [15:0] late;

  rich_formatter dut (.clk, .rst_n, .in_valid, .in_ready, .in_item,
                      .out_valid, .out_ready, .out_word, .late_drops (late));

  int checks = 0, failures = 0;
  rich_item_t stim[$];
  bit [31:0] got[$], exp[$];
  bit bp = 1;

  function automatic rich_item_t it(bit d, int ts, int fine, int n, int cts);
    rich_item_t r;
    r.is_data = d; r.ts = 28'(ts); r.fine = 12'(fine); r.n = 8'(n); r.cts = 8'(cts);
    return r;
  endfunction

  initial begin
    bit fire_in;
    in_valid = 0; in_item = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      in_valid  = rst_n && stim.size() > 0;
      if (stim.size() > 0) in_item = stim[0];
      out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      fire_in = in_valid && in_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  initial begin
    stim.push_back(it(0, 5, 0, 0, 0));
    stim.push_back(it(1, 5, 10, 2, 3));
    stim.push_back(it(1, 7, 1, 1, -4));
    stim.push_back(it(0, 7, 0, 0, 0));
    stim.push_back(it(1, 6, 99, 1, 0));
    stim.push_back(it(0, 8, 0, 0, 0));
    stim.push_back(it(1, 9, 4095, 255, -128));
    exp = '{ts_word(5), data_word(2, 3, 10), ts_word(6), data_word(0, 0, 0), ts_word(7),
            data_word(1, -4, 1), ts_word(8), data_word(0, 0, 0), ts_word(9),
            data_word(255, -128, 4095)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (20) @(posedge clk);
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
    // throughput: 32 clusters of one timestamp with the output always ready
    begin
      int cyc = 0;
      bp = 0;
      got.delete();
      for (int i = 0; i < 32; i++) stim.push_back(it(1, 9, i, 1, 0));
      while (stim.size() > 0) begin @(posedge clk); cyc++; end
      repeat (3) @(posedge clk);
      checks++; if (got.size() != 32 || cyc > 33) begin failures++; $display("throughput %0d words %0d cycles", got.size(), cyc); end
    end
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
