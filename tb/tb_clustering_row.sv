// tb_clustering_row: directed test of one row of four cells (window 10).
// Clusters are sent back to back, one per cycle, in a shuffled time order;
// after flush_req the row must write exactly four entries into its FIFO,
// the occupied ones with the right seeds, N, CTS and positions equal to the
// time rank; a fifth separate cluster must be discarded and counted. The
// latency from the last input to the last entry in the FIFO is checked
// against the design's row latency L = 2*4 + 3 + 3 = 14 cycles.
module tb_clustering_row;
  import rich_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc, in_valid, flush_req, idle, rd_pop, rd_empty;
  logic [FRAME_W-1:0] alloc_frame, frame;
  cluster_t in_cl;
  row_entry_t rd_entry;
  logic [15:0] ovf;

  clustering_row dut (.clk, .rst_n, .window (8'd10), .alloc, .alloc_frame, .in_valid, .in_cl,
    .flush_req, .idle, .frame, .rd_pop, .rd_entry, .rd_empty, .overflows (ovf));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct { int t; int n; int cts; } c_t;

  task automatic run(c_t cl[$], int exp_t[$], int exp_n[$], int exp_cts[$], int exp_ovf, int fr);
    row_entry_t e[$];
    int lat = 0;
    @(negedge clk);
    alloc = 1; alloc_frame = 32'(fr);
    foreach (cl[i]) begin
      in_valid = 1; in_cl.t = 9'(cl[i].t); in_cl.n = 8'(cl[i].n); in_cl.cts = 24'(cl[i].cts);
      @(negedge clk);
      alloc = 0;
    end
    in_valid = 0; flush_req = 1;
    @(negedge clk);
    flush_req = 0;
    lat = 1;
    while (dut.fifo_count < 4) begin @(negedge clk); lat++; end
    check(lat <= 14, $sformatf("row latency %0d <= 14", lat));
    check(ovf == 16'(exp_ovf), $sformatf("overflows %0d", ovf));
    for (int k = 0; k < 4; k++) begin
      e.push_back(rd_entry);
      rd_pop = 1;
      @(negedge clk);
      rd_pop = 0;
    end
    check(rd_empty, "exactly four entries");
    foreach (exp_t[i]) begin
      int hit = 0;
      foreach (e[k]) if (e[k].valid && e[k].cl.t == 9'(exp_t[i])) begin
        hit = 1;
        check(e[k].cl.n == 8'(exp_n[i]) && $signed(e[k].cl.cts) == exp_cts[i] &&
              e[k].pos == 8'(i) && e[k].frame == 32'(fr),
              $sformatf("cluster t=%0d: n=%0d cts=%0d pos=%0d", exp_t[i], e[k].cl.n, $signed(e[k].cl.cts), e[k].pos));
      end
      check(hit == 1, $sformatf("cluster t=%0d present", exp_t[i]));
    end
    begin
      int nv = 0;
      foreach (e[k]) nv += e[k].valid;
      check(nv == exp_t.size(), $sformatf("%0d valid entries", nv));
    end
    repeat (2) @(negedge clk);
    check(idle, "idle after flush");
  endtask

  initial begin
    alloc = 0; in_valid = 0; flush_req = 0; rd_pop = 0; alloc_frame = '0; in_cl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 200 seeds; 50 separate; 52 merges into 50 (cts 2); 120; 198 merges into 200 (cts -2);
    // 10 separate (4th cluster); 250 is a fifth separate cluster: discarded
    run('{'{200,1,0}, '{50,1,0}, '{52,1,0}, '{120,2,0}, '{198,1,0}, '{10,1,0}, '{250,1,0}},
        '{10, 50, 120, 200}, '{1, 2, 2, 2}, '{0, 2, 0, -2}, 1, 1234);
    // a row with two clusters, one of them an overflow hit (seed 262)
    run('{'{262,1,0}, '{3,3,1}, '{265,1,0}}, '{3, 262}, '{3, 2}, '{1, 3}, 1, 1235);
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
