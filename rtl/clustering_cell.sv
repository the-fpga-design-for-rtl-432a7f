// clustering_cell: one cell of a clustering row. It holds at most one cluster
// (seed time T0, number of hits N0, cluster time-sum CTS0) and a sorting
// position.
//
// When a cluster (T1, N1, CTS1, position p) arrives from the left:
//   - cell empty            : it becomes the seed; position = p;
//   - |T1 - T0| <= window   : merged, N0 += N1 and CTS0 += N1*(T1 - T0) + CTS1;
//   - T1 > T0, no match     : passed right with position p + 1;
//   - T1 < T0, no match     : passed right with position p.
// Whenever some cell of the row stores a new seed Tn (new_valid/new_t, driven
// by the row from the stored_now/st_cl outputs), every occupied cell with
// T0 > Tn adds one to its position. So after a row has seen all its clusters,
// the positions are the ranks of the seeds in time order, which the data
// collector uses to sort them. The design's rule adds one to the stored
// position as soon as a smaller cluster passes; that also counts clusters
// that are later merged further right or discarded at the end of the row and
// leaves gaps in the positions, so here the increment waits until the
// smaller cluster is really stored.
// The product N1*(T1 - T0) comes from a multiplier with MUL_LAT cycles of
// latency; the seed and N0 change at once, and the product (with CTS1) travels
// through a delay line and is added to CTS0 exactly MUL_LAT cycles later.
// Since addition commutes, a cell keeps accepting a cluster every cycle.
// In flush mode (shift = 1) the cell loads the content of its left neighbour,
// so the row becomes a shift register. pending tells the row that products are
// still on their way.
// The merge rule, the position rule and the multiplier are the design's; the
// delay line form, the 8-bit window and N saturating at 255 are this
// implementation's choices. Passing on is registered: one cycle per cell.
module clustering_cell
  import rich_pkg::*;
#(
  parameter int unsigned MUL_LAT = 3   // at least 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       window,
  // cluster arriving from the left
  input  logic             in_valid,
  input  cluster_t         in_cl,
  input  logic [POS_W-1:0] in_pos,
  // cluster passed to the right
  output logic             out_valid,
  output cluster_t         out_cl,
  output logic [POS_W-1:0] out_pos,
  // flush mode
  input  logic             shift,
  input  logic             shift_in_occ,
  input  cluster_t         shift_in_cl,
  input  logic [POS_W-1:0] shift_in_pos,
  // stored content
  output logic             occ,
  output cluster_t         st_cl,
  output logic [POS_W-1:0] st_pos,
  output logic             pending,
  // new-seed broadcast inside the row
  output logic             stored_now,
  input  logic             new_valid,
  input  logic [FT_W-1:0]  new_t
);
  localparam int unsigned PROD_W = FT_W + N_W + 2;

  logic signed [FT_W:0]      diff;
  logic [FT_W:0]             adiff;
  logic                      match, greater;
  logic signed [PROD_W-1:0]  prod;

  assign diff    = $signed({1'b0, in_cl.t}) - $signed({1'b0, st_cl.t});
  assign adiff   = diff[FT_W] ? (FT_W+1)'(-diff) : (FT_W+1)'(diff);
  assign match   = occ && (adiff <= {2'b00, window});
  assign greater = !diff[FT_W];
  assign prod    = $signed({1'b0, in_cl.n}) * diff;

  // multiplier delay line: product and CTS1 of each merge; with the CTS0
  // register itself the sum lands MUL_LAT cycles after the merge
  localparam int unsigned DL = MUL_LAT - 1;
  logic                     mv [DL];
  logic signed [CTS_W-1:0]  ms [DL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DL; i++) begin
        mv[i] <= 1'b0;
        ms[i] <= '0;
      end
    end else begin
      mv[0] <= in_valid && match && !shift;
      ms[0] <= CTS_W'(prod) + in_cl.cts;
      for (int i = 1; i < DL; i++) begin
        mv[i] <= mv[i-1];
        ms[i] <= ms[i-1];
      end
    end
  end

  always_comb begin
    pending = 1'b0;
    for (int i = 0; i < DL; i++) pending |= mv[i];
  end

  assign stored_now = in_valid && !occ && !shift;

  logic [N_W:0] nsum;
  assign nsum = st_cl.n + in_cl.n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ       <= 1'b0;
      st_cl     <= '0;
      st_pos    <= '0;
      out_valid <= 1'b0;
      out_cl    <= '0;
      out_pos   <= '0;
    end else if (shift) begin
      occ       <= shift_in_occ;
      st_cl     <= shift_in_cl;
      st_pos    <= shift_in_pos;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!occ) begin
          occ    <= 1'b1;
          st_cl  <= in_cl;
          st_pos <= in_pos;
        end else if (match) begin
          st_cl.n <= nsum[N_W] ? '1 : nsum[N_W-1:0];
        end else begin
          out_valid <= 1'b1;
          out_cl    <= in_cl;
          out_pos   <= greater ? in_pos + 1'b1 : in_pos;
        end
      end
      if (occ && new_valid && new_t < st_cl.t) st_pos <= st_pos + 1'b1;
      if (mv[DL-1]) st_cl.cts <= st_cl.cts + ms[DL-1];
    end
  end
endmodule
