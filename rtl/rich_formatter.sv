// rich_formatter: turns a time-ordered stream of items (clusters, or "time has
// reached timestamp ts" markers) into the RICH word stream.
//
// The RICH stream carries, for every 400 ns timestamp from the first one seen,
// a timestamp word followed by at least one data word; a timestamp without
// clusters gets one speed-data word (nhits = 0, cts = 0) so that a consumer
// such as the data merger never starves. This block is the "formatter" of the
// clustering module's data collector, and is also the output stage of the data
// converter and of the data merger, so every module speaks the same format.
//
// Per cycle it emits at most one word:
//   - if the item's timestamp is ahead of the last one emitted, it first closes
//     the current timestamp (speed data if it had no cluster), then emits the
//     timestamp word of the next timestamp, one timestamp at a time (gaps are
//     filled with timestamp + speed-data pairs);
//   - a cluster of the current timestamp is emitted as a data word;
//   - a marker that is not ahead is consumed with no output;
//   - a cluster older than the current timestamp cannot be placed any more and
//     is dropped and counted in late_drops.
// Handshake: valid/ready on both sides; the output is a register.
module rich_formatter
  import rich_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  rich_item_t  in_item,
  output logic        out_valid,
  input  logic        out_ready,
  output rich_word_t  out_word,
  output logic [15:0] late_drops
);
  logic            started, has_data;
  logic [TS_W-1:0] last_ts;
  logic            can_go;

  assign can_go = !out_valid || out_ready;

  typedef enum logic [1:0] {ACT_NONE, ACT_SPEED, ACT_TS, ACT_DATA} act_e;
  act_e            act;
  logic            consume, drop;
  logic [TS_W-1:0] next_ts;

  always_comb begin
    act     = ACT_NONE;
    consume = 1'b0;
    drop    = 1'b0;
    next_ts = started ? last_ts + 1'b1 : in_item.ts;
    if (in_valid) begin
      if (!started || in_item.ts > last_ts) begin
        if (started && !has_data) act = ACT_SPEED;
        else begin
          act = ACT_TS;
          if (!in_item.is_data && next_ts == in_item.ts) consume = 1'b1;
        end
      end else if (in_item.is_data) begin
        consume = 1'b1;
        if (in_item.ts == last_ts) act = ACT_DATA;
        else drop = 1'b1;
      end else begin
        consume = 1'b1;
      end
    end
  end

  assign in_ready = can_go && consume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started    <= 1'b0;
      has_data   <= 1'b0;
      last_ts    <= '0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      late_drops <= '0;
    end else if (can_go) begin
      out_valid <= act != ACT_NONE;
      unique case (act)
        ACT_SPEED: begin
          out_word <= make_data_word('0, '0, '0);
          has_data <= 1'b1;
        end
        ACT_TS: begin
          out_word <= make_ts_word(next_ts);
          last_ts  <= next_ts;
          started  <= 1'b1;
          has_data <= 1'b0;
        end
        ACT_DATA: begin
          out_word <= make_data_word(in_item.n, in_item.cts, in_item.fine);
          has_data <= 1'b1;
        end
        default: ;
      endcase
      if (drop && late_drops != '1) late_drops <= late_drops + 1'b1;
    end
  end
endmodule
