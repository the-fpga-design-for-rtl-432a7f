// tb_clustering_cell: directed test of one clustering cell (window 10).
// Checks seeding, merging (N at once, CTS after the multiplier latency of 3
// cycles), passing with the position rule, the new-seed broadcast, a second
// merge with a negative time difference and CTS1, and the flush shift.
module tb_clustering_cell;
  import rich_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, shift, shift_in_occ, occ, pending, stored_now, new_valid;
  cluster_t in_cl, out_cl, shift_in_cl, st_cl;
  logic [POS_W-1:0] in_pos, out_pos, shift_in_pos, st_pos;
  logic [FT_W-1:0] new_t;

  clustering_cell dut (.clk, .rst_n, .window (8'd10), .in_valid, .in_cl, .in_pos,
    .out_valid, .out_cl, .out_pos, .shift, .shift_in_occ, .shift_in_cl, .shift_in_pos,
    .occ, .st_cl, .st_pos, .pending, .stored_now, .new_valid, .new_t);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: occ=%0d t=%0d n=%0d cts=%0d pos=%0d out_v=%0d out_pos=%0d",
      what, occ, st_cl.t, st_cl.n, st_cl.cts, st_pos, out_valid, out_pos); end
  endtask

  task automatic send(int t, int n, int cts, int pos);
    @(negedge clk);
    in_valid = 1; in_cl.t = 9'(t); in_cl.n = 8'(n); in_cl.cts = 24'(cts); in_pos = 8'(pos);
    #1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_cl = '0; in_pos = '0; shift = 0; shift_in_occ = 0; shift_in_cl = '0;
    shift_in_pos = '0; new_valid = 0; new_t = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!occ, "empty after reset");
    // seed
    @(negedge clk);
    in_valid = 1; in_cl.t = 100; in_cl.n = 1; in_cl.cts = 0; in_pos = 0;
    #1 check(stored_now, "stored_now when seeding");
    @(negedge clk); in_valid = 0;
    check(occ && st_cl.t == 100 && st_cl.n == 1 && st_pos == 0 && !out_valid, "seed");
    // merge: N now, CTS three cycles later
    send(105, 2, 4, 0);
    check(st_cl.n == 3 && st_cl.cts == 0 && pending && !out_valid, "merge N at once, CTS pending");
    @(negedge clk);
    check(st_cl.cts == 0, "CTS not before the multiplier latency");
    @(negedge clk);
    check(st_cl.cts == 14 && !pending, "CTS += 2*(105-100)+4 after 3 cycles");
    // greater cluster passes with position + 1
    send(130, 1, 0, 0);
    check(out_valid && out_cl.t == 130 && out_pos == 1 && st_pos == 0, "greater passes, pos+1");
    // smaller cluster passes with its position, stored position unchanged
    send(50, 1, 0, 2);
    check(out_valid && out_cl.t == 50 && out_pos == 2 && st_pos == 0, "smaller passes");
    // broadcast: a smaller seed stored elsewhere raises the position
    @(negedge clk); new_valid = 1; new_t = 60;
    @(negedge clk); new_valid = 0;
    check(st_pos == 1, "smaller new seed raises position");
    @(negedge clk); new_valid = 1; new_t = 120;
    @(negedge clk); new_valid = 0;
    check(st_pos == 1, "greater new seed leaves position");
    // merge with negative difference and CTS1: 14 + 1*(95-100) - 2 = 7
    send(95, 1, -2, 0);
    repeat (3) @(negedge clk);
    check(st_cl.n == 4 && $signed(st_cl.cts) == 7, "second merge");
    // edge of the window: 111 does not match, 110 does
    send(111, 1, 0, 0);
    check(out_valid, "outside window passes");
    send(110, 1, 0, 0);
    check(!out_valid && st_cl.n == 5, "window edge matches");
    repeat (4) @(negedge clk);
    // N saturates
    send(100, 255, 0, 0);
    repeat (4) @(negedge clk);
    check(st_cl.n == 255, "N saturates");
    // flush shift
    @(negedge clk);
    shift = 1; shift_in_occ = 1; shift_in_cl.t = 7; shift_in_cl.n = 2; shift_in_cl.cts = 3; shift_in_pos = 3;
    @(negedge clk);
    shift = 0;
    check(occ && st_cl.t == 7 && st_cl.n == 2 && st_cl.cts == 3 && st_pos == 3, "shift loads left neighbour");
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
