// tb_data_collector: the sixteen row FIFOs are modelled by queues. Twenty
// rows (so the row and RAM pointers wrap) are filled with four entries each,
// in a scrambled order, carrying up to four clusters whose position fields
// are their time ranks, some with overflowed seeds (fine time >= 256), large
// time-sums (saturated to 8 bits) and multiplicities outside the kept range
// [2, 12]. One entry with a position of 5 must be dropped. The RICH output
// must list the kept clusters of every row in time order with absolute
// times frame*256 + seed. The FIFOs are filled slowly at first (rows arrive
// one by one) and then all at once, to check one entry per cycle.
module tb_data_collector;
  import tb_rich_pkg::*;
  import rich_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] rd_pop, rd_empty;
  row_entry_t rd_entry [16];
  logic out_valid, out_ready;
  rich_word_t out_word;
  logic [15:0] pos_drops, discards, late;

  data_collector dut (.clk, .rst_n, .mult_min (8'd2), .mult_max (8'd12), .rd_pop, .rd_entry, .rd_empty,
    .out_valid, .out_ready, .out_word, .pos_drops, .mult_discards (discards), .late_drops (late));

  int checks = 0, failures = 0, exp_disc = 0;
  row_entry_t q [16][$];
  row_entry_t pending [$];
  bit [31:0] got[$];
  cl_q_t exp;

  task automatic upd();
    for (int r = 0; r < 16; r++) begin
      rd_empty[r] = q[r].size() == 0;
      rd_entry[r] = q[r].size() > 0 ? q[r][0] : '0;
    end
  endtask

  initial begin
    bit [15:0] pops;
    out_ready = 0;
    upd();
    forever begin
      @(negedge clk);
      out_ready = $urandom_range(0, 5) != 0;
      #1;
      upd();
      #1;
      pops = rd_pop;
      if (out_valid && out_ready) got.push_back(out_word);
      @(posedge clk);
      foreach (pops[r]) if (pops[r]) void'(q[r].pop_front());
    end
  end

  task automatic make_row(int r, longint frame);
    row_entry_t e[$];
    int ts[$], nc = $urandom_range(0, 4);
    while (ts.size() < nc) begin
      int t = $urandom_range(0, 300);
      if (!(t inside {ts})) ts.push_back(t);
    end
    foreach (ts[i]) begin
      row_entry_t x;
      int rank = 0;
      foreach (ts[j]) if (ts[j] < ts[i]) rank++;
      x.valid = 1; x.frame = 32'(frame); x.pos = 8'(rank);
      x.cl.t = 9'(ts[i]); x.cl.n = 8'($urandom_range(1, 14)); x.cl.cts = 24'($urandom_range(0, 600) - 300);
      e.push_back(x);
    end
    while (e.size() < 4) begin
      row_entry_t x = '0;
      x.frame = 32'(frame);
      e.push_back(x);
    end
    if (r == 5) begin e[3].valid = 1; e[3].pos = 5; e[3].cl.t = 9'd400; e[3].cl.n = 4; end
    e.shuffle();
    foreach (e[i]) pending.push_back(e[i]);
    // expected
    ts.sort();
    foreach (ts[i]) foreach (e[k]) if (e[k].valid && e[k].pos < 4 && e[k].cl.t == 9'(ts[i])) begin
      if (e[k].cl.n < 2 || e[k].cl.n > 12) exp_disc++;
      else begin
        cl_t c;
        longint a = frame * 256 + ts[i];
        c.ts = a / 4096; c.fine = int'(a % 4096); c.n = e[k].cl.n; c.cts = sat8($signed(e[k].cl.cts));
        exp.push_back(c);
      end
    end
  endtask

  initial begin
    cl_q_t res;
    int e = 0, n = 0, bad;
    longint f0 = 64'h5_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      make_row(r, f0 + 3 * r);
      @(negedge clk);
      foreach (pending[i]) q[r % 16].push_back(pending[i]);
      pending.delete();
      if (r < 8) repeat (12) @(negedge clk);
      else if (r == 15) repeat (60) @(negedge clk);
    end
    repeat (200) @(posedge clk);
    res = parse_stream(got, e, n);
    checks++; if (e != 0) begin failures++; $display("format errors %0d", e); end
    bad = compare(no_speed(res), exp, "collector");
    checks++; if (bad != 0) failures++;
    checks++; if (pos_drops != 16'd1) begin failures++; $display("pos_drops %0d", pos_drops); end
    checks++; if (discards != 16'(exp_disc) || exp_disc == 0) begin failures++; $display("discards %0d vs %0d", discards, exp_disc); end
    checks++; if (n < (3 * 19) / 16) begin failures++; $display("%0d timestamps", n); end
    $display("clusters %0d discards %0d timestamps %0d", exp.size(), exp_disc, n);
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
