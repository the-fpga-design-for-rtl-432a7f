// intertel_tx: sends RICH words over the 16-bit InterTEL bus that links
// neighbouring boards in a daisy chain. Each 32-bit word leaves as two 16-bit
// halves, high half first, each half carrying its own 2-bit tag so the
// receiver (intertel_rx) can rebuild the word. One half per cycle with
// bus_valid high, so a word takes two cycles; in_ready is high while the
// transmitter is free to take the next word. A half is only sent while the
// receiver raises bus_ready, a back-channel that keeps a waiting receiver
// from losing words. The 16-bit bus and the separable halves are the
// design's; the strobe, the half order and the back-channel are this
// implementation's choices.
module intertel_tx
  import rich_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  rich_word_t  in_word,
  output logic        bus_valid,
  output logic [15:0] bus_data,
  input  logic        bus_ready
);
  logic        low_pending;
  logic [15:0] low_half;

  assign in_ready = !low_pending && bus_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_pending <= 1'b0;
      low_half    <= '0;
      bus_valid   <= 1'b0;
      bus_data    <= '0;
    end else if (!bus_ready) begin
      bus_valid <= 1'b0;
    end else if (low_pending) begin
      bus_valid   <= 1'b1;
      bus_data    <= low_half;
      low_pending <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        bus_data    <= in_word[31:16];
        low_half    <= in_word[15:0];
        low_pending <= 1'b1;
      end
    end
  end
endmodule
