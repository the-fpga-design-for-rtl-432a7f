// clustering_row: one row of the clustering module, holding the clusters of
// one 25 ns frame. N_CELLS clustering cells are chained: a cluster enters the
// first cell and moves right until it is merged or stored; one that leaves the
// last cell finds the row full and is discarded (counted in overflows), which
// bounds a frame to N_CELLS clusters, i.e. a cluster rate of 160 MHz at 4
// cells per 25 ns.
//
// Life of a row: alloc (from the data distributor) clears it and records its
// frame number; clusters arrive on in_valid/in_cl; flush_req asks for its
// read-out. The row then waits until the cell chain and the multiplier delay
// lines are empty (N_CELLS + MUL_LAT quiet cycles) and shifts the N_CELLS
// cells to the right into its output FIFO, one entry per cycle, empty cells
// included, so every row yields exactly N_CELLS entries. idle is high when the
// row may be allocated again. The FIFO is read by the data collector.
// Worst-case latency from the last input to the last entry written is
// N_CELLS (travel) + MUL_LAT + 1 + N_CELLS (shift) cycles, the
// 2*depth + multiplier term of the design's sizing (2*4 + 3).
// The cell chain and flush-as-shift-register follow the design; the quiet-time
// rule and the FIFO depth are this implementation's choices.
module clustering_row
  import rich_pkg::*;
#(
  parameter int unsigned N_CELLS    = 4,
  parameter int unsigned MUL_LAT    = 3,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         window,
  input  logic               alloc,        // may come with the first in_valid
  input  logic [FRAME_W-1:0] alloc_frame,
  input  logic               in_valid,
  input  cluster_t           in_cl,
  input  logic               flush_req,
  output logic               idle,
  output logic [FRAME_W-1:0] frame,
  // output FIFO
  input  logic               rd_pop,
  output row_entry_t         rd_entry,
  output logic               rd_empty,
  output logic [15:0]        overflows
);
  localparam int unsigned QUIET = N_CELLS + MUL_LAT + 1;

  logic             c_in_valid [N_CELLS+1];
  cluster_t         c_in_cl    [N_CELLS+1];
  logic [POS_W-1:0] c_in_pos   [N_CELLS+1];
  logic             c_occ      [N_CELLS];
  cluster_t         c_cl       [N_CELLS];
  logic [POS_W-1:0] c_pos      [N_CELLS];
  logic             c_pend     [N_CELLS];
  logic             c_new      [N_CELLS];
  logic             shift;
  logic             new_valid;
  logic [FT_W-1:0]  new_t;

  // at most one cell stores a new seed per cycle: the input chain fills the
  // cells from the left and a cell is emptied only by a flush
  always_comb begin
    new_valid = 1'b0;
    new_t     = '0;
    for (int i = 0; i < N_CELLS; i++) begin
      if (c_new[i]) begin
        new_valid = 1'b1;
        new_t     = c_in_cl[i].t;
      end
    end
  end

  assign c_in_valid[0] = in_valid;
  assign c_in_cl[0]    = in_cl;
  assign c_in_pos[0]   = '0;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    clustering_cell #(.MUL_LAT(MUL_LAT)) u_cell (
      .clk, .rst_n, .window,
      .in_valid     (c_in_valid[i]),
      .in_cl        (c_in_cl[i]),
      .in_pos       (c_in_pos[i]),
      .out_valid    (c_in_valid[i+1]),
      .out_cl       (c_in_cl[i+1]),
      .out_pos      (c_in_pos[i+1]),
      .shift        (shift),
      .shift_in_occ (i == 0 ? 1'b0 : c_occ[i == 0 ? 0 : i-1]),
      .shift_in_cl  (i == 0 ? '0   : c_cl[i == 0 ? 0 : i-1]),
      .shift_in_pos (i == 0 ? '0   : c_pos[i == 0 ? 0 : i-1]),
      .occ          (c_occ[i]),
      .st_cl        (c_cl[i]),
      .st_pos       (c_pos[i]),
      .pending      (c_pend[i]),
      .stored_now   (c_new[i]),
      .new_valid    (new_valid),
      .new_t        (new_t)
    );
  end

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_WAIT, S_SHIFT} state_e;
  state_e state;
  logic [$clog2(QUIET+1)-1:0]   quiet;
  logic [$clog2(N_CELLS+1)-1:0] nshift;
  logic                         any_pend;
  logic                         fifo_full;
  logic [$clog2(FIFO_DEPTH):0]  fifo_count;
  row_entry_t                   push_entry;

  always_comb begin
    any_pend = 1'b0;
    for (int i = 0; i < N_CELLS; i++) any_pend |= c_pend[i];
  end

  assign idle  = state == S_IDLE;
  assign shift = state == S_SHIFT;

  always_comb begin
    push_entry.valid = c_occ[N_CELLS-1];
    push_entry.frame = frame;
    push_entry.pos   = c_pos[N_CELLS-1];
    push_entry.cl    = c_cl[N_CELLS-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      frame     <= '0;
      quiet     <= '0;
      nshift    <= '0;
      overflows <= '0;
    end else begin
      if (c_in_valid[N_CELLS] && overflows != '1) overflows <= overflows + 1'b1;
      if (in_valid) quiet <= '0;
      else if (quiet != ($clog2(QUIET+1))'(QUIET)) quiet <= quiet + 1'b1;
      unique case (state)
        S_IDLE: if (alloc) begin
          state <= S_FILL;
          frame <= alloc_frame;
          quiet <= '0;
        end
        S_FILL: if (flush_req) state <= S_WAIT;
        S_WAIT: if (!in_valid && quiet == ($clog2(QUIET+1))'(QUIET) && !any_pend &&
                    fifo_count <= ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - N_CELLS)) begin
          state  <= S_SHIFT;
          nshift <= '0;
        end
        S_SHIFT: begin
          nshift <= nshift + 1'b1;
          if (nshift == ($clog2(N_CELLS+1))'(N_CELLS-1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  sync_fifo #(.WIDTH($bits(row_entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (shift),
    .wdata (push_entry),
    .pop   (rd_pop),
    .rdata (rd_entry),
    .full  (fifo_full),
    .empty (rd_empty),
    .count (fifo_count)
  );

  a_alloc_when_idle: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> idle);
  a_no_input_when_idle: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (!idle || alloc));
endmodule
