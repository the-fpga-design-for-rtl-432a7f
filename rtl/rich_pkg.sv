// rich_pkg: types and constants shared by the RICH L0 trigger-primitive logic.
//
// The common "RICH format" is a 32-bit word that can be cut into two 16-bit
// halves for a 16-bit board-to-board (InterTEL) link; each half carries a 2-bit
// tag so a receiver can tell the kind and the half of the word.
//   Timestamp word : [31:30]=TAG_TS_HI [29:16]=ts[27:14] [15:14]=TAG_TS_LO [13:0]=ts[13:0]
//                    ts counts 400 ns units (28 bits, about 60 minutes of range).
//   Data word      : [31:30]=TAG_D_HI  [29:24]=nhits[7:2] [23:16]=cts (signed, 100 ps)
//                    [15:14]=TAG_D_LO  [13:12]=nhits[1:0] [11:0]=fine time (100 ps,
//                    spans one 400 ns timestamp).
// A data word with nhits = 0 and cts = 0 is "speed data": it only says that the
// timestamp it follows has been seen and holds no clusters.
// The field layout follows the format table of the design; the tag values are
// this implementation's choice.
//
// Inside the clustering module time is split into 25 ns frames (32-bit frame
// number = {ts, fine[11:8]}) and a fine time within the frame. The fine time has
// 8 bits plus a 9th "overflow" bit for a hit of the next frame that was added to
// a cluster of the previous frame.
package rich_pkg;

  localparam int unsigned TS_W    = 28;  // 400 ns timestamp
  localparam int unsigned FINE_W  = 12;  // 100 ps units inside a timestamp
  localparam int unsigned TIME_W  = TS_W + FINE_W;  // 40-bit TDC time
  localparam int unsigned FRAME_W = 32;  // 25 ns frame number
  localparam int unsigned FT_W    = 9;   // fine time in a frame, with overflow bit
  localparam int unsigned N_W     = 8;   // number of hits
  localparam int unsigned CTSF_W  = 8;   // cluster time-sum in the RICH format
  localparam int unsigned CTS_W   = 24;  // cluster time-sum inside the clustering cells
  localparam int unsigned POS_W   = 8;   // sorting position field of a cell

  typedef logic [31:0] rich_word_t;

  localparam logic [1:0] TAG_D_HI  = 2'b00;
  localparam logic [1:0] TAG_D_LO  = 2'b01;
  localparam logic [1:0] TAG_TS_HI = 2'b10;
  localparam logic [1:0] TAG_TS_LO = 2'b11;

  // Decoded form of a RICH word, and of a "time advance" marker. A word with
  // is_data = 0 means "time has reached timestamp ts".
  typedef struct packed {
    logic                      is_data;
    logic [TS_W-1:0]           ts;
    logic [FINE_W-1:0]         fine;
    logic [N_W-1:0]            n;
    logic signed [CTSF_W-1:0]  cts;
  } rich_item_t;

  // A cluster as held by a clustering cell.
  typedef struct packed {
    logic [FT_W-1:0]          t;    // seed time inside the row's frame
    logic [N_W-1:0]           n;
    logic signed [CTS_W-1:0]  cts;
  } cluster_t;

  // One entry pushed by a row into its output FIFO when it is flushed.
  typedef struct packed {
    logic                 valid;
    logic [FRAME_W-1:0]   frame;
    logic [POS_W-1:0]     pos;
    cluster_t             cl;
  } row_entry_t;

  function automatic rich_word_t make_ts_word(input logic [TS_W-1:0] ts);
    return {TAG_TS_HI, ts[27:14], TAG_TS_LO, ts[13:0]};
  endfunction

  function automatic rich_word_t make_data_word(input logic [N_W-1:0] n,
                                                input logic signed [CTSF_W-1:0] cts,
                                                input logic [FINE_W-1:0] fine);
    return {TAG_D_HI, n[7:2], cts, TAG_D_LO, n[1:0], fine};
  endfunction

  function automatic logic is_ts_word(input rich_word_t w);
    return w[31:30] == TAG_TS_HI;
  endfunction

  function automatic logic [TS_W-1:0] ts_of(input rich_word_t w);
    return {w[29:16], w[13:0]};
  endfunction

  function automatic logic [N_W-1:0] n_of(input rich_word_t w);
    return {w[29:24], w[13:12]};
  endfunction

  function automatic logic signed [CTSF_W-1:0] cts_of(input rich_word_t w);
    return w[23:16];
  endfunction

  function automatic logic [FINE_W-1:0] fine_of(input rich_word_t w);
    return w[11:0];
  endfunction

  // Saturate an internal time-sum to the 8-bit signed field of the format.
  function automatic logic signed [CTSF_W-1:0] sat_cts(input logic signed [CTS_W-1:0] v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return -8'sd128;
    else               return v[CTSF_W-1:0];
  endfunction

endpackage
