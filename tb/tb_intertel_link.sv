// tb_intertel_link: a transmitter and a receiver of the 16-bit InterTEL bus
// back to back. Random RICH words (data and timestamp words) are sent with
// random gaps and random back-pressure at the receiver output; each must
// arrive unchanged and in order, two bus cycles per word, none lost while the
// receiver holds the transmitter back through bus_ready. Then a lone low half is put on the bus: the receiver must drop it,
// count a tag error and still receive the next word.
module tb_intertel_link;
  import tb_rich_pkg::*;
  import rich_pkg::rich_word_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, tx_valid, bus_valid, bus_ready, out_valid, out_ready, inject;
  logic [15:0] tx_data, bus_data, inj_data, errs;
  rich_word_t in_word, out_word;

  intertel_tx u_tx (.clk, .rst_n, .in_valid, .in_ready, .in_word, .bus_valid (tx_valid), .bus_data (tx_data), .bus_ready);
  assign bus_valid = inject ? 1'b1 : tx_valid;
  assign bus_data  = inject ? inj_data : tx_data;
  intertel_rx u_rx (.clk, .rst_n, .bus_valid, .bus_data, .bus_ready, .out_valid, .out_ready, .out_word, .tag_errors (errs));

  int checks = 0, failures = 0, bus_cycles = 0, held = 0;
  bit bp = 1;
  bit [31:0] stim[$], exp[$], got[$];

  initial begin
    bit fire_in;
    in_valid = 0; in_word = '0; out_ready = 0;
    forever begin
      @(negedge clk);
      in_valid = rst_n && stim.size() > 0 && ($urandom_range(0, 2) != 0);
      if (stim.size() > 0) in_word = stim[0];
      out_ready = !bp || ($urandom_range(0, 3) == 0);
      #1;
      fire_in = in_valid && in_ready;
      if (out_valid && out_ready) got.push_back(out_word);
      if (!bus_ready) held++;
      if (tx_valid) bus_cycles++;
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  initial begin
    inject = 0; inj_data = '0;
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 3) == 0) stim.push_back(ts_word($urandom()));
      else stim.push_back(data_word($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 4095)));
      exp.push_back(stim[$]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (100) @(posedge clk);
    checks++; if (got.size() != exp.size()) begin failures++; $display("got %0d expected %0d", got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) begin failures++; if (failures < 5) $display("word %0d: got %h expected %h", i, got[i], exp[i]); end
    end
    checks++; if (bus_cycles != 2 * exp.size()) begin failures++; $display("bus cycles %0d", bus_cycles); end
    checks++; if (held == 0) begin failures++; $display("receiver never held the transmitter"); end
    bp = 0;
    // lone low half
    @(negedge clk); inject = 1; inj_data = data_word(1, 2, 3) >> 0;
    inj_data = 16'(data_word(1, 2, 3));
    @(negedge clk); inject = 0;
    got.delete();
    stim.push_back(data_word(9, 9, 9));
    repeat (10) @(posedge clk);
    checks++; if (errs != 16'd1) begin failures++; $display("tag errors %0d", errs); end
    checks++; if (got.size() != 1 || got[0] != data_word(9, 9, 9)) begin failures++; $display("no resync"); end
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
