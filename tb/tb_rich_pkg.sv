// tb_rich_pkg: reference models and helpers for the RICH trigger testbenches.
// The models work on plain integers and queues, independently of the RTL:
//   parse_stream   : checks a RICH word stream (consecutive timestamps, each
//                    with at least one data word) and lists its data words;
//   cluster_model  : what the clustering module must produce from a sequence
//                    of input clusters (frame routing with the overflow rule,
//                    4 cells per row, merge rule, ranking, multiplicity cut);
//   avg_model      : the average calculator;
//   merge_model    : the data merger (two-pointer merge on 25 ns frames).
package tb_rich_pkg;

  typedef struct {
    longint ts;
    int     fine;
    int     n;
    int     cts;
  } cl_t;
  typedef cl_t cl_q_t[$];

  typedef struct {
    longint frame;
    int     t;
    int     n;
    int     cts;
  } ent_t;

  typedef struct {
    longint frame;
    ent_t   cells[$];
    int     dropped[$];
  } row_t;

  function automatic bit [31:0] ts_word(longint ts);
    bit [27:0] t = ts[27:0];
    return {2'b10, t[27:14], 2'b11, t[13:0]};
  endfunction

  function automatic bit [31:0] data_word(int n, int cts, int fine);
    bit [7:0] nn = n[7:0];
    bit [7:0] cc = cts[7:0];
    bit [11:0] ff = fine[11:0];
    return {2'b00, nn[7:2], cc, 2'b01, nn[1:0], ff};
  endfunction

  function automatic int sat8(int v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  // Parse a RICH stream. errors counts format violations.
  function automatic cl_q_t parse_stream(bit [31:0] w[$], ref int errors, ref int n_ts);
    cl_q_t  q;
    longint cur = -1;
    int     nd = 1;
    n_ts = 0;
    foreach (w[i]) begin
      if (w[i][31:30] == 2'b10) begin
        longint t = longint'({w[i][29:16], w[i][13:0]});
        if (w[i][15:14] != 2'b11) errors++;
        if (cur >= 0 && t != cur + 1) errors++;
        if (nd == 0) errors++;
        cur = t;
        nd  = 0;
        n_ts++;
      end else begin
        cl_t c;
        if (w[i][31:30] != 2'b00 || w[i][15:14] != 2'b01) errors++;
        if (cur < 0) errors++;
        c.ts   = cur;
        c.n    = int'({w[i][29:24], w[i][13:12]});
        c.cts  = int'($signed(w[i][23:16]));
        c.fine = int'(w[i][11:0]);
        q.push_back(c);
        nd++;
      end
    end
    return q;
  endfunction

  function automatic cl_q_t no_speed(cl_q_t q);
    cl_q_t r;
    foreach (q[i]) if (q[i].n != 0) r.push_back(q[i]);
    return r;
  endfunction

  function automatic longint frame_of(cl_t c);
    return c.ts * 16 + (c.fine >> 8);
  endfunction

  // Data merger: both heads needed; earlier frame first, A on a tie.
  function automatic cl_q_t merge_model(cl_q_t a, cl_q_t b);
    cl_q_t r;
    int i = 0, j = 0;
    while (i < a.size() && j < b.size()) begin
      if (frame_of(a[i]) <= frame_of(b[j])) begin r.push_back(a[i]); i++; end
      else begin r.push_back(b[j]); j++; end
    end
    return r;
  endfunction

  function automatic void add_to_row(ref row_t row, input int t, int n, int cts, int w,
                                     input int n_cells, ref int cell_ovf);
    foreach (row.cells[k]) begin
      int d = t - row.cells[k].t;
      if ((d < 0 ? -d : d) <= w) begin
        row.cells[k].n   = (row.cells[k].n + n > 255) ? 255 : row.cells[k].n + n;
        row.cells[k].cts = row.cells[k].cts + n * d + cts;
        return;
      end
    end
    if (row.cells.size() < n_cells) begin
      ent_t e;
      e.frame = row.frame; e.t = t; e.n = n; e.cts = cts;
      row.cells.push_back(e);
    end else begin
      row.dropped.push_back(t);
      cell_ovf++;
    end
  endfunction

  // Clustering module on a sequence of input clusters (speed data removed).
  function automatic cl_q_t cluster_model(cl_q_t in, int w, int mmin, int mmax, int n_cells,
                                          ref int ovf_hits, ref int cell_ovf, ref int discards);
    row_t  rows[$];
    cl_q_t r;
    foreach (in[i]) begin
      longint g = frame_of(in[i]);
      int     f = in[i].fine % 256;
      int     L = rows.size();
      if (L > 0 && rows[L-1].frame == g - 1 && f < w) begin
        add_to_row(rows[L-1], 256 + f, in[i].n, in[i].cts, w, n_cells, cell_ovf); ovf_hits++;
      end else if (L > 1 && rows[L-2].frame == g - 1 && rows[L-1].frame == g && f < w) begin
        add_to_row(rows[L-2], 256 + f, in[i].n, in[i].cts, w, n_cells, cell_ovf); ovf_hits++;
      end else if (L > 0 && rows[L-1].frame == g) begin
        add_to_row(rows[L-1], f, in[i].n, in[i].cts, w, n_cells, cell_ovf);
      end else if (L == 0 || rows[L-1].frame < g) begin
        row_t nr;
        nr.frame = g;
        rows.push_back(nr);
        add_to_row(rows[L], f, in[i].n, in[i].cts, w, n_cells, cell_ovf);
      end else if (L > 1 && rows[L-2].frame == g) begin
        add_to_row(rows[L-2], f, in[i].n, in[i].cts, w, n_cells, cell_ovf);
      end
    end
    foreach (rows[k]) begin
      ent_t s[$];
      foreach (rows[k].cells[c]) begin
        int rank = 0;
        foreach (rows[k].cells[o]) if (rows[k].cells[o].t < rows[k].cells[c].t) rank++;
        if (rank < n_cells) s.push_back(rows[k].cells[c]);
      end
      s.sort() with (item.t);
      foreach (s[c]) begin
        if (s[c].n < mmin || s[c].n > mmax) discards++;
        else begin
          cl_t o;
          longint a = rows[k].frame * 256 + s[c].t;
          o.ts = a / 4096; o.fine = int'(a % 4096); o.n = s[c].n; o.cts = sat8(s[c].cts);
          r.push_back(o);
        end
      end
    end
    return r;
  endfunction

  function automatic cl_q_t avg_model(cl_q_t in);
    cl_q_t r;
    foreach (in[i]) begin
      cl_t o = in[i];
      if (o.n != 0) begin
        int q = o.cts / o.n;  // truncates toward zero
        int t = o.fine + q;
        o.fine = t < 0 ? 0 : (t > 4095 ? 4095 : t);
        o.cts  = 0;
      end
      r.push_back(o);
    end
    return r;
  endfunction

  function automatic cl_q_t before_ts(cl_q_t q, longint cut);
    cl_q_t r;
    foreach (q[i]) if (q[i].ts < cut) r.push_back(q[i]);
    return r;
  endfunction

  // Compare two cluster lists; returns the number of mismatches.
  function automatic int compare(cl_q_t got, cl_q_t exp, string tag);
    int bad = 0;
    if (got.size() != exp.size()) begin
      $display("%s: %0d clusters, expected %0d", tag, got.size(), exp.size());
      bad++;
    end
    for (int i = 0; i < got.size() && i < exp.size(); i++) begin
      if (got[i].ts != exp[i].ts || got[i].fine != exp[i].fine ||
          got[i].n != exp[i].n || got[i].cts != exp[i].cts) begin
        if (bad < 5)
          $display("%s[%0d]: got ts=%0d fine=%0d n=%0d cts=%0d, expected ts=%0d fine=%0d n=%0d cts=%0d",
                   tag, i, got[i].ts, got[i].fine, got[i].n, got[i].cts,
                   exp[i].ts, exp[i].fine, exp[i].n, exp[i].cts);
        bad++;
      end
    end
    return bad;
  endfunction

  // Random TDC hits for timestamps t0 .. t0+nt-1, in read-out order: 25 ns
  // frames in order, hits shuffled inside a frame. Patterns: groups closer
  // than the window, hits at frame boundaries, frames with six separate
  // clusters, large groups, empty frames. rate (0..9) sets how busy it is.
  function automatic cl_q_t gen_hits(longint t0, int nt, int rate);
    cl_q_t r;
    for (longint t = t0; t < t0 + nt; t++)
      for (int fr = 0; fr < 16; fr++) begin
        cl_q_t h;
        int kind = $urandom_range(0, 19);
        cl_t c;
        c.ts = t; c.n = 1; c.cts = 0;
        if (kind < rate) begin
          for (int g = 0; g < $urandom_range(1, 2); g++) begin
            int ctr = $urandom_range(20, 230);
            for (int k = 0; k < $urandom_range(1, 6); k++) begin
              c.fine = fr * 256 + ctr + $urandom_range(0, 6); h.push_back(c);
            end
          end
        end else if (kind == 10) begin
          c.fine = fr * 256 + 250 + $urandom_range(0, 5); h.push_back(c);
        end else if (kind == 11) begin
          c.fine = fr * 256 + $urandom_range(0, 6); h.push_back(c);
          c.fine = fr * 256 + 128; h.push_back(c);
        end else if (kind == 12) begin
          for (int k = 0; k < 6; k++) begin c.fine = fr * 256 + 10 + 40 * k; h.push_back(c); end
        end else if (kind == 13 && $urandom_range(0, 2) == 0) begin
          for (int k = 0; k < 14; k++) begin c.fine = fr * 256 + 100 + $urandom_range(0, 4); h.push_back(c); end
        end
        h.shuffle();
        foreach (h[i]) r.push_back(h[i]);
      end
    return r;
  endfunction

endpackage
