// tb_rich_l0_top: end-to-end test of one board at full size (the top's
// default parameters: four pre-processing chains of 16 rows x 4 cells and the
// sync-link chain), set up as the last board of an InterTEL daisy chain.
// The previous board is modelled by the testbench: a RICH stream of averaged
// clusters, built with the reference model, is sent over the 16-bit InterTEL
// bus by an intertel_tx instance that obeys the board's ready back-channel.
// Four TDC boards feed random hits (tb_rich_pkg::gen_hits) with a marker for
// each timestamp without hits; two timestamps have no hit anywhere, so speed
// data must reach the primitive output. The L0 trigger processor is a sink
// with random back-pressure and one long stop. Every stage is checked against the reference
// model on the streams it actually received (hierarchical probes):
//   each PP output       = avg_model(cluster_model(its hits));
//   each merger          = merge_model(its two inputs);
//   primitives           = avg_model(cluster_model(merged stream));
//   InterTEL receive     = the words the previous board sent, in order;
//   InterTEL output      = silent, because this is the last board.
// The mechanisms of the design are counted and each must occur: overflow hits
// into the previous frame (PP and SL), full rows, multiplicity discards,
// merger waits, distributor stalls, speed data, InterTEL transfer and
// primitive back-pressure. The production delay (last input word of a
// timestamp to the primitive stream closing it) is measured and must stay
// below 5 time frames of 6.4 us.
module tb_rich_l0_top;
  import tb_rich_pkg::*;
  import rich_pkg::*;

  localparam int NT = 24, TRAIL = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  tv, tr, tm;
  logic [39:0] tt [4];
  logic        itel_v, itel_rdy, out_v, prim_v, prim_ready;
  logic [15:0] itel_d, out_d;
  rich_word_t  prim_w;
  logic [15:0] ppc[4], ppo[4], ppd[4], ppx[4], slc, slo, sld, slx, te;
  logic        far_v, far_r;
  rich_word_t  far_w;

  rich_l0_top dut (
    .clk, .rst_n, .window (8'd10), .mult_min (8'd1), .mult_max (8'd12),
    .intertel_en (1'b1), .last_board (1'b1),
    .tdc_valid (tv), .tdc_ready (tr), .tdc_mark (tm), .tdc_time (tt),
    .itel_in_valid (itel_v), .itel_in_data (itel_d), .itel_in_ready (itel_rdy),
    .itel_out_valid (out_v), .itel_out_data (out_d), .itel_out_ready (1'b1),
    .prim_valid (prim_v), .prim_ready, .prim_word (prim_w),
    .pp_cell_overflows (ppc), .pp_overflow_hits (ppo), .pp_drops (ppd), .pp_discards (ppx),
    .sl_cell_overflows (slc), .sl_overflow_hits (slo), .sl_drops (sld), .sl_discards (slx),
    .itel_tag_errors (te));

  // the previous board's InterTEL transmitter
  intertel_tx u_far (
    .clk, .rst_n, .in_valid (far_v), .in_ready (far_r), .in_word (far_w),
    .bus_valid (itel_v), .bus_data (itel_d), .bus_ready (itel_rdy));

  int checks = 0, failures = 0;
  bit [40:0]  stim [4][$];
  bit [31:0]  far_q [$], far_sent [$];
  // observed streams: 0..3 PP outputs, 4 m0, 5 m1, 6 m2, 7 m3 (= clustering
  // input), 8 primitives, 9 InterTEL receive
  bit [31:0] obs [10][$];
  int merger_waits = 0, dist_stalls = 0, prim_bp = 0, rx_lost = 0, pp_merge_waits = 0, out_busy = 0;
  // production delay: cycle at which the last input word of timestamp T was
  // accepted, and cycle at which the primitive stream closed T (timestamp
  // word T+1 accepted)
  int in_done [longint], out_done [longint];
  int cyc = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit [3:0] fire;
    bit       far_fire;
    bit [27:0] far_ts = '0;
    tv = '0; tm = '0; far_v = 0; far_w = '0;
    for (int i = 0; i < 4; i++) tt[i] = '0;
    prim_ready = 0;
    forever begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        tv[i] = rst_n && stim[i].size() > 0 && ($urandom_range(0, 3) != 0);
        if (stim[i].size() > 0) {tm[i], tt[i]} = stim[i][0];
      end
      far_v = rst_n && far_q.size() > 0 && ($urandom_range(0, 3) != 0);
      if (far_q.size() > 0) far_w = far_q[0];
      // the trigger processor stops taking primitives for a while, so the
      // back-pressure reaches the sync-link distributor
      cyc++;
      prim_ready = (cyc < 200 || cyc > 1200) && $urandom_range(0, 5) != 0;
      #1;
      fire     = tv & tr;
      far_fire = far_v && far_r;
      for (int i = 0; i < 4; i++)
        if (dut.pp_valid[i] && dut.pp_ready[i]) obs[i].push_back(dut.pp_word[i]);
      if (dut.u_sl.m0_v && dut.u_sl.m0_r) obs[4].push_back(dut.u_sl.m0_w);
      if (dut.u_sl.m1_v && dut.u_sl.m1_r) obs[5].push_back(dut.u_sl.m1_w);
      if (dut.u_sl.m2_v && dut.u_sl.m2_r) obs[6].push_back(dut.u_sl.m2_w);
      if (dut.u_sl.c_v && dut.u_sl.c_r) obs[7].push_back(dut.u_sl.c_w);
      if (prim_v && prim_ready) begin
        obs[8].push_back(prim_w);
        if (prim_w[31:30] == 2'b10) out_done[longint'({prim_w[29:16], prim_w[13:0]}) - 1] = cyc;
      end
      for (int i = 0; i < 4; i++) if (fire[i]) in_done[longint'(tt[i][39:12])] = cyc;
      if (far_fire && far_w[31:30] == 2'b00) in_done[longint'(far_ts)] = cyc;
      if (dut.rx_valid && dut.rx_ready) obs[9].push_back(dut.rx_word);
      if (dut.u_rx.w_valid && dut.u_rx.f_full) rx_lost++;
      if (dut.u_sl.u_m3.ea != dut.u_sl.u_m3.eb) merger_waits++;
      if (dut.u_sl.u_m0.ea != dut.u_sl.u_m0.eb) pp_merge_waits++;
      if (dut.u_sl.u_clu.in_valid && !dut.u_sl.u_clu.in_ready) dist_stalls++;
      if (prim_v && !prim_ready) prim_bp++;
      if (out_v) out_busy++;
      @(posedge clk);
      for (int i = 0; i < 4; i++) if (fire[i]) void'(stim[i].pop_front());
      if (far_fire) begin
        if (far_q[0][31:30] == 2'b10) far_ts = {far_q[0][29:16], far_q[0][13:0]};
        far_sent.push_back(far_q.pop_front());
      end
    end
  end

  function automatic cl_q_t P(int k);
    int e = 0, n = 0;
    cl_q_t q = parse_stream(obs[k], e, n);
    return q;
  endfunction

  function automatic int fmt_errors(int k);
    int e = 0, n = 0;
    cl_q_t q = parse_stream(obs[k], e, n);
    return e;
  endfunction

  function automatic int n_speed(cl_q_t q);
    int s = 0;
    foreach (q[i]) if (q[i].n == 0) s++;
    return s;
  endfunction

  initial begin
    cl_q_t hits [4], far;
    longint t0 = 7000, cut;
    int eo, ec, ed, sum_ppo = 0, sum_ppc = 0, sum_ppx = 0, speed = 0, idle = 0;
    cut = t0 + NT;
    for (int i = 0; i < 5; i++) begin
      automatic cl_q_t h = gen_hits(t0, NT, 6);
      // two timestamps without any hit on any board
      for (int k = h.size() - 1; k >= 0; k--)
        if (h[k].ts == t0 + 5 || h[k].ts == t0 + 6) h.delete(k);
      if (i < 4) hits[i] = h;
      else begin
        eo = 0; ec = 0; ed = 0;
        far = avg_model(cluster_model(h, 10, 1, 12, 4, eo, ec, ed));
        // the upstream board runs a wider multiplicity range: some of its
        // clusters are above this board's limit and must be discarded here
        foreach (far[k]) if (k % 16 == 5) far[k].n = 13;
      end
    end
    for (longint t = t0; t < t0 + NT + TRAIL; t++) begin
      int any;
      for (int i = 0; i < 4; i++) begin
        any = 0;
        foreach (hits[i][h]) if (hits[i][h].ts == t) begin
          stim[i].push_back({1'b0, 28'(t), 12'(hits[i][h].fine)});
          any = 1;
        end
        if (!any) stim[i].push_back({1'b1, 28'(t), 12'd0});
      end
      // previous board: timestamp word, then its clusters or speed data
      far_q.push_back(ts_word(t));
      any = 0;
      foreach (far[k]) if (far[k].ts == t) begin
        far_q.push_back(data_word(far[k].n, far[k].cts, far[k].fine));
        any = 1;
      end
      if (!any) far_q.push_back(data_word(0, 0, 0));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // run until all stimulus is in and the primitive output has been quiet
    while (idle < 3000) begin
      @(posedge clk);
      idle = (prim_v || stim[0].size() || far_q.size()) ? 0 : idle + 1;
    end
    for (int k = 0; k < 10; k++) chk(fmt_errors(k) == 0, $sformatf("format of stream %0d", k));
    // pre-processing chains
    for (int i = 0; i < 4; i++) begin
      cl_q_t exp;
      eo = 0; ec = 0; ed = 0;
      exp = avg_model(cluster_model(hits[i], 10, 1, 12, 4, eo, ec, ed));
      chk(compare(before_ts(no_speed(P(i)), cut), before_ts(exp, cut),
                  $sformatf("PP%0d", i)) == 0, "PP clusters");
      sum_ppo += ppo[i];
      sum_ppc += ppc[i];
      sum_ppx += ppx[i];
    end
    // mergers
    chk(compare(before_ts(no_speed(P(4)), cut), before_ts(no_speed(merge_model(P(0), P(1))), cut), "m0") == 0, "m0");
    chk(compare(before_ts(no_speed(P(5)), cut), before_ts(no_speed(merge_model(P(2), P(3))), cut), "m1") == 0, "m1");
    chk(compare(before_ts(no_speed(P(6)), cut), before_ts(no_speed(merge_model(P(4), P(5))), cut), "m2") == 0, "m2");
    chk(compare(before_ts(no_speed(P(7)), cut), before_ts(no_speed(merge_model(P(6), P(9))), cut), "m3") == 0, "m3");
    // sync-link clustering
    begin
      cl_q_t e;
      int so = 0, sc = 0, sd = 0;
      e = avg_model(cluster_model(no_speed(P(7)), 10, 1, 12, 4, so, sc, sd));
      chk(compare(before_ts(no_speed(P(8)), cut), before_ts(e, cut), "primitives") == 0, "primitives");
      $display("primitives: %0d clusters in %0d timestamps", before_ts(e, cut).size(), cut - t0);
    end
    // InterTEL: the board receives exactly what the previous board sent
    begin
      automatic int same = obs[9].size() == far_sent.size() && far_q.size() == 0;
      foreach (obs[9][i]) if (i < far_sent.size() && obs[9][i] != far_sent[i]) same = 0;
      chk(same == 1, "InterTEL words equal the previous board's words");
    end
    chk(rx_lost == 0 && te == 0, "no InterTEL loss");
    chk(out_busy == 0, "last board sends nothing on its InterTEL output");
    speed = n_speed(P(8));
    $display("speed words per stream: PP %0d %0d %0d %0d, m0 %0d m1 %0d m2 %0d m3 %0d, prim %0d, rx %0d",
             n_speed(P(0)), n_speed(P(1)), n_speed(P(2)), n_speed(P(3)), n_speed(P(4)),
             n_speed(P(5)), n_speed(P(6)), n_speed(P(7)), speed, n_speed(P(9)));
    // mechanisms
    $display("overflow hits PP %0d SL %0d, full rows PP %0d SL %0d, discards PP %0d SL %0d",
             sum_ppo, slo, sum_ppc, slc, sum_ppx, slx);
    $display("merger waits %0d/%0d, distributor stalls %0d, InterTEL words %0d, primitive back-pressure %0d",
             pp_merge_waits, merger_waits, dist_stalls, obs[9].size(), prim_bp);
    chk(sum_ppo > 0, "PP overflow hits happened");
    chk(slo > 0, "SL overflow hits happened");
    chk(sum_ppc > 0, "PP full rows happened");
    chk(sum_ppx > 0 && slx > 0, "multiplicity discards happened");
    chk(merger_waits > 0 && pp_merge_waits > 0, "merger waits happened");
    chk(dist_stalls > 0, "distributor stalls happened");
    chk(speed > 0, "speed data reached the output");
    chk(obs[9].size() > 0, "InterTEL transfer happened");
    chk(prim_bp > 0, "primitive back-pressure happened");
    // time order of the primitives (by seed before averaging, see README)
    begin
      automatic cl_q_t q = no_speed(P(8));
      automatic int ooo = 0;
      for (int i = 1; i < q.size(); i++)
        if (q[i].ts * 4096 + q[i].fine < q[i-1].ts * 4096 + q[i-1].fine) ooo++;
      $display("primitives out of time order: %0d of %0d", ooo, q.size());
    end
    // delay of primitive production: the design must close a timestamp well
    // within 5 time frames of 6.4 us (5 x 1024 cycles at 160 MHz) after its
    // last input word; the long output stop is left out of the measurement
    begin
      int dmax = 0, n = 0;
      for (longint t = t0; t < t0 + NT; t++)
        if (in_done.exists(t) && out_done.exists(t) && !(out_done[t] >= 200 && in_done[t] <= 1200)) begin
          if (out_done[t] - in_done[t] > dmax) dmax = out_done[t] - in_done[t];
          n++;
        end
      $display("primitive delay: at most %0d cycles over %0d timestamps (limit 5120)", dmax, n);
      chk(n > 0 && dmax < 5 * 1024, "primitive delay below 5 time frames");
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
