// data_distributor: input stage of the clustering module. It reads a RICH
// stream, rebuilds for every data word its 25 ns frame number
// ({timestamp, fine[11:8]}, 32 bits) and its fine time inside the frame
// (fine[7:0], 100 ps), and delivers the cluster to the row that holds that
// frame. Rows are taken in circular order, one per frame that has data.
//
// Clusters that span two frames: a hit of frame G whose fine time f is below
// the matching window may belong to a cluster at the end of frame G-1. If the
// row of frame G-1 is still open, the hit goes there with fine time 256 + f,
// the 9th ("overflow") bit set. Hence two rows are filled at the same time, and
// a row is flushed (handed to the data collector) once time has moved two
// frames past it: when row n is being filled, row n-2 is flushed. The same rule
// flushes the last rows when only timestamps and speed data follow.
// Speed data (nhits = 0) allocates an empty row so that its timestamp still
// reaches the output; it never occupies a cell. Input stalls (in_ready = 0)
// while the next row to allocate is still being read out. A word older than
// every open row is dropped and counted in late_drops.
// One word per cycle; the routing is combinational, the row interface is the
// rows' own inputs. The frame split, the 9-bit overflow fine time and the
// n-2 flush follow the design; the routing rule's details are this
// implementation's choices.
module data_distributor
  import rich_pkg::*;
#(
  parameter int unsigned N_ROWS = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         window,
  input  logic               in_valid,
  output logic               in_ready,
  input  rich_word_t         in_word,
  // to the rows
  output logic [N_ROWS-1:0]  row_alloc,
  output logic [FRAME_W-1:0] alloc_frame,
  output logic [N_ROWS-1:0]  row_in_valid,
  output cluster_t           row_in_cl,
  output logic [N_ROWS-1:0]  row_flush,
  input  logic [N_ROWS-1:0]  row_idle,
  // statistics
  output logic [15:0]        late_drops,
  output logic [15:0]        overflow_hits
);
  localparam int unsigned RW = $clog2(N_ROWS);

  logic [TS_W-1:0]    cur_ts;
  logic [FRAME_W-1:0] latest;
  logic [RW:0]        ap, fp;          // allocate / flush pointers
  logic [FRAME_W-1:0] rframe [N_ROWS];

  logic [RW:0]        live;
  logic [RW-1:0]      cur, prv, nxt, old;
  assign live = ap - fp;
  assign cur  = RW'(ap - 1'b1);
  assign prv  = RW'(ap - 2'd2);
  assign nxt  = RW'(ap);
  assign old  = RW'(fp);

  logic               is_ts, is_speed;
  logic [FRAME_W-1:0] g, gm1;
  logic [7:0]         f;
  logic               can_alloc;
  assign is_ts     = is_ts_word(in_word);
  assign is_speed  = n_of(in_word) == '0;
  assign g         = {cur_ts, fine_of(in_word)[11:8]};
  assign gm1       = g - 1'b1;
  assign f         = fine_of(in_word)[7:0];
  assign can_alloc = (live < (RW+1)'(N_ROWS)) && row_idle[nxt];

  // routing decision
  logic          do_alloc, do_send, do_drop, ovf, accept;
  logic [RW-1:0] tgt;
  always_comb begin
    do_alloc = 1'b0;
    do_send  = 1'b0;
    do_drop  = 1'b0;
    ovf      = 1'b0;
    tgt      = cur;
    accept   = 1'b1;
    if (in_valid && !is_ts) begin
      if (is_speed) begin
        if (live == '0 || rframe[cur] < g) begin
          do_alloc = 1'b1;
          tgt      = nxt;
          accept   = can_alloc;
        end
      end else if (live != '0 && rframe[cur] == gm1 && f < window) begin
        do_send = 1'b1;
        ovf     = 1'b1;
      end else if (live >= (RW+1)'(2) && rframe[prv] == gm1 && rframe[cur] == g && f < window) begin
        do_send = 1'b1;
        ovf     = 1'b1;
        tgt     = prv;
      end else if (live != '0 && rframe[cur] == g) begin
        do_send = 1'b1;
      end else if (live == '0 || rframe[cur] < g) begin
        do_alloc = 1'b1;
        do_send  = 1'b1;
        tgt      = nxt;
        accept   = can_alloc;
      end else if (live >= (RW+1)'(2) && rframe[prv] == g) begin
        do_send = 1'b1;
        tgt     = prv;
      end else begin
        do_drop = 1'b1;
      end
    end
  end

  assign in_ready = accept;

  logic fire, do_flush;
  assign fire     = in_valid && accept;
  // flush the oldest open row once time is two frames past it
  assign do_flush = live != '0 && (rframe[old] + 1'b1 < latest) &&
                    !(fire && do_send && tgt == old);

  always_comb begin
    row_alloc    = '0;
    row_in_valid = '0;
    row_flush    = '0;
    if (fire && do_alloc) row_alloc[tgt]    = 1'b1;
    if (fire && do_send)  row_in_valid[tgt] = 1'b1;
    if (do_flush)         row_flush[old]    = 1'b1;
    alloc_frame     = g;
    row_in_cl.t     = {ovf, f};
    row_in_cl.n     = n_of(in_word);
    row_in_cl.cts   = CTS_W'(cts_of(in_word));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_ts        <= '0;
      latest        <= '0;
      ap            <= '0;
      fp            <= '0;
      late_drops    <= '0;
      overflow_hits <= '0;
      for (int i = 0; i < N_ROWS; i++) rframe[i] <= '0;
    end else begin
      if (fire) begin
        if (is_ts) begin
          cur_ts <= ts_of(in_word);
          if ({ts_of(in_word), 4'h0} > latest) latest <= {ts_of(in_word), 4'h0};
        end else if (g > latest) latest <= g;
        if (do_alloc) begin
          rframe[nxt] <= g;
          ap          <= ap + 1'b1;
        end
        if (do_drop && late_drops != '1) late_drops <= late_drops + 1'b1;
        if (do_send && ovf && overflow_hits != '1) overflow_hits <= overflow_hits + 1'b1;
      end
      if (do_flush) fp <= fp + 1'b1;
    end
  end
endmodule
