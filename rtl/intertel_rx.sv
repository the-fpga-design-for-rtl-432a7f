// intertel_rx: receiving side of the 16-bit InterTEL bus. It rebuilds 32-bit
// RICH words from pairs of tagged halves: a half tagged as a high half
// (data or timestamp) is kept, and the following half with the matching low
// tag completes the word. A low half with no matching high half is dropped and
// counted in tag_errors, so the receiver resynchronises after a lost half.
// Rebuilt words wait in a small FIFO and leave with valid/ready. bus_ready,
// the back-channel to the transmitter, is high while the FIFO has room for
// the words that may still be on their way (a half on the bus, a half held
// here). Tag values are those of rich_pkg; the FIFO and back-channel are this
// implementation's choices.
module intertel_rx
  import rich_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_valid,
  input  logic [15:0] bus_data,
  output logic        bus_ready,
  output logic        out_valid,
  input  logic        out_ready,
  output rich_word_t  out_word,
  output logic [15:0] tag_errors
);
  localparam int unsigned DEPTH = 8;
  logic       w_valid, f_full, f_empty;
  rich_word_t w_word;
  logic [$clog2(DEPTH):0] f_count;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .push (w_valid), .wdata (w_word), .pop (out_valid && out_ready),
    .rdata (out_word), .full (f_full), .empty (f_empty), .count (f_count));
  assign out_valid = !f_empty;
  assign bus_ready = f_count < ($clog2(DEPTH)+1)'(DEPTH / 2);

  logic        have_hi;
  logic [15:0] hi;
  logic [1:0]  tag;
  assign tag = bus_data[15:14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_hi    <= 1'b0;
      hi         <= '0;
      w_valid    <= 1'b0;
      w_word     <= '0;
      tag_errors <= '0;
    end else begin
      w_valid <= 1'b0;
      if (bus_valid) begin
        if (tag == TAG_D_HI || tag == TAG_TS_HI) begin
          if (have_hi && tag_errors != '1) tag_errors <= tag_errors + 1'b1;
          have_hi <= 1'b1;
          hi      <= bus_data;
        end else if (have_hi && ((hi[15:14] == TAG_D_HI  && tag == TAG_D_LO) ||
                                 (hi[15:14] == TAG_TS_HI && tag == TAG_TS_LO))) begin
          w_valid   <= 1'b1;
          w_word    <= {hi, bus_data};
          have_hi   <= 1'b0;
        end else begin
          have_hi <= 1'b0;
          if (tag_errors != '1) tag_errors <= tag_errors + 1'b1;
        end
      end
    end
  end
endmodule
