// tb_data_distributor: directed test of the data distributor (window 10,
// 16 rows, rows always reusable). A short RICH stream exercises: allocation
// of a row per 25 ns frame, hits of the current frame, an overflow hit sent
// to the current row with fine time 256 + f, an overflow hit sent to the
// previous row while the next frame is already being filled, the flush of
// row n-2, flushes caused by a later timestamp word, a row allocated for
// speed data, and a late word that is dropped. The allocations, deliveries
// and flushes are logged and compared with hand-worked lists.
module tb_data_distributor;
  import tb_rich_pkg::*;
  import rich_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  rich_word_t in_word;
  logic [15:0] row_alloc, row_in_valid, row_flush, row_idle;
  logic [31:0] alloc_frame;
  cluster_t row_in_cl;
  logic [15:0] late, ovf;

  data_distributor dut (.clk, .rst_n, .window (8'd10), .in_valid, .in_ready, .in_word,
    .row_alloc, .alloc_frame, .row_in_valid, .row_in_cl, .row_flush, .row_idle,
    .late_drops (late), .overflow_hits (ovf));

  int checks = 0, failures = 0;
  bit [31:0] stim[$];
  string allocs[$], sends[$], flushes[$];

  function automatic int idx(logic [15:0] v);
    foreach (v[i]) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    bit fire_in;
    in_valid = 0; in_word = '0; row_idle = '1;
    forever begin
      @(negedge clk);
      in_valid = rst_n && stim.size() > 0;
      if (stim.size() > 0) in_word = stim[0];
      #1;
      fire_in = in_valid && in_ready;
      if (row_alloc != 0) allocs.push_back($sformatf("%0d:%h", idx(row_alloc), alloc_frame));
      if (row_in_valid != 0) sends.push_back($sformatf("%0d:%0d", idx(row_in_valid), row_in_cl.t));
      if (row_flush != 0) flushes.push_back($sformatf("%0d", idx(row_flush)));
      @(posedge clk);
      if (fire_in) void'(stim.pop_front());
    end
  end

  task automatic cmp(string got[$], string exp[$], string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %p expected %p", what, got, exp);
    end
  endtask

  initial begin
    stim = '{ts_word(10),
             data_word(1, 0, 12'h105),   // frame a1, f=5    -> alloc row0, row0:5
             data_word(1, 0, 12'h1F0),   // frame a1, f=240  -> row0:240
             data_word(1, 0, 12'h203),   // frame a2, f=3    -> overflow into row0:259
             data_word(1, 0, 12'h250),   // frame a2, f=80   -> alloc row1, row1:80
             data_word(1, 0, 12'h208),   // frame a2, f=8    -> previous row0:264
             data_word(1, 0, 12'h420),   // frame a4, f=32   -> alloc row2, row2:32; flush row0
             ts_word(11),                // time {b,0}: flush row1, row2
             data_word(0, 0, 12'h000),   // speed in ts 11   -> alloc row3
             data_word(1, 0, 12'h030),   // frame b0, f=48   -> row3:48
             data_word(1, 0, 12'h010),   // frame b0, f=16   -> row3:16
             ts_word(10),                // back in time (not allowed)
             data_word(1, 0, 12'h020),   // frame a0: late, dropped
             ts_word(13)};               // time {d,0}: flush row3
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stim.size() == 0);
    repeat (5) @(posedge clk);
    cmp(allocs, '{"0:000000a1", "1:000000a2", "2:000000a4", "3:000000b0"}, "allocations");
    cmp(sends, '{"0:5", "0:240", "0:259", "1:80", "0:264", "2:32", "3:48", "3:16"}, "deliveries");
    cmp(flushes, '{"0", "1", "2", "3"}, "flushes");
    checks++; if (late != 16'd1 || ovf != 16'd2) begin failures++; $display("late %0d ovf %0d", late, ovf); end
    // stall: no free row
    begin
      int stall = 0;
      row_idle = '0;
      stim = '{data_word(1, 0, 12'h310)};
      repeat (5) @(posedge clk);
      checks++; if (stim.size() != 1) begin failures++; $display("did not stall on busy row"); end
      row_idle = '1;
      repeat (3) @(posedge clk);
      checks++; if (stim.size() != 0) begin failures++; $display("did not resume"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
