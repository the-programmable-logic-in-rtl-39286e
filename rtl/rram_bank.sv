// rram_bank: one resistive crossbar bank with its row decoder, column
// decoder and sense amplifiers, modelled at the logic level.
//
// The bank holds ROWS x COLS words of WORD_W bits. A word is selected by a
// row (wordline) and a column group (WORD_W bitlines). Reading is
// combinational: the sense amplifiers of the selected column group return
// the stored word, and the memory's read register samples it. Writing is a
// pulse on the selected row: every bit whose mask is set receives the
// levels wr_p (wordline, electrode P) and wr_q (bitline, electrode Q) and
// takes the value M3(P, ~Q, Z) of its resistive switch (rm3_cell); bits
// whose mask is clear keep their state. A standard store is the special
// case P = d, Q = ~d, which leaves d in the cell whatever Z was.
// Timing: the write takes effect at the rising clock edge while wr_en is
// high. The array is non-volatile and is not reset.
// Row/column sizes are this design's choice; the multi-bank organisation
// with a shared row decoder and per-bank column decoders follows the
// architecture this memory belongs to.
module rram_bank #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned ROWS   = 2 ** 19,
  parameter int unsigned COLS   = 64
) (
  input  logic                                 clk,
  // read (sense amplifiers)
  input  logic [(ROWS > 1 ? $clog2(ROWS) : 1)-1:0] rd_row,
  input  logic [(COLS > 1 ? $clog2(COLS) : 1)-1:0] rd_col,
  output logic [WORD_W-1:0]                    rd_data,
  // write (resistive-majority pulse on the masked bits of one word)
  input  logic                                 wr_en,
  input  logic [(ROWS > 1 ? $clog2(ROWS) : 1)-1:0] wr_row,
  input  logic [(COLS > 1 ? $clog2(COLS) : 1)-1:0] wr_col,
  input  logic [WORD_W-1:0]                    wr_mask,
  input  logic [WORD_W-1:0]                    wr_p,
  input  logic [WORD_W-1:0]                    wr_q
);
  localparam int unsigned WORDS = ROWS * COLS;
  localparam int unsigned IDX_W = WORDS > 1 ? $clog2(WORDS) : 1;

  logic [WORD_W-1:0] cells [WORDS];

  // Row and column decoding: the selected word is row * COLS + col.
  logic [IDX_W-1:0] rd_idx, wr_idx;
  assign rd_idx = IDX_W'(rd_row) * IDX_W'(COLS) + IDX_W'(rd_col);
  assign wr_idx = IDX_W'(wr_row) * IDX_W'(COLS) + IDX_W'(wr_col);

  assign rd_data = cells[rd_idx];

  // The switches of the addressed word under the write pulse.
  logic [WORD_W-1:0] cur_word, pulsed_word, next_word;
  assign cur_word = cells[wr_idx];

  for (genvar b = 0; b < WORD_W; b++) begin : g_cell
    rm3_cell u_cell (
      .p (wr_p[b]),
      .q (wr_q[b]),
      .z (cur_word[b]),
      .zn(pulsed_word[b])
    );
  end

  assign next_word = (pulsed_word & wr_mask) | (cur_word & ~wr_mask);

  always_ff @(posedge clk) begin
    if (wr_en) cells[wr_idx] <= next_word;
  end

endmodule
