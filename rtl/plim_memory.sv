// plim_memory: multi-bank resistive memory with its read and write registers.
//
// The memory holds 2**ADDR_W bits as 2**ADDR_W / WORD_W words, split evenly
// over N_BANKS banks of ROWS x COLS words. A word address is cut as
// {bank, row, column}: the shared row decoder selects the row in all banks,
// each bank's column decoder its word, and the block decoder picks the bank.
//
// Read: with rd_en high, the addressed word is sampled into the read register
// at the rising edge, so rd_data shows it from the next cycle on and holds it
// until the next read.
// Write: a request (wr_req high) is sampled into the write register at the
// rising edge; in the following cycle the write circuit pulses the array and
// the new value is stored at the end of that cycle. A read of the same word
// therefore sees the new value when issued two or more cycles after the
// request, and the old value when issued in the cycle right after it.
// Requests are either whole-word stores or single-bit resistive-majority
// updates (see write_circuit). The register placement follows the
// architecture; the timing and the address split are this design's choice.
module plim_memory
  import plim_pkg::*;
#(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned ADDR_W  = 32,   // bit-address width
  parameter int unsigned N_BANKS = 8,
  parameter int unsigned COLS    = 64    // words per row in one bank
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // read port
  input  logic                                   rd_en,
  input  logic [ADDR_W-$clog2(WORD_W)-1:0]       rd_addr,   // word address
  output logic [WORD_W-1:0]                      rd_data,   // read register
  // write port
  input  logic                                   wr_req,
  input  wr_kind_e                               wr_kind,
  input  logic [ADDR_W-$clog2(WORD_W)-1:0]       wr_addr,   // word address
  input  logic [$clog2(WORD_W)-1:0]              wr_bit,
  input  logic [WORD_W-1:0]                      wr_data,
  input  logic                                   wr_p,
  input  logic                                   wr_q
);
  localparam int unsigned BIT_W      = $clog2(WORD_W);
  localparam int unsigned WADDR_W    = ADDR_W - BIT_W;
  localparam longint unsigned TOTAL  = 64'd1 << WADDR_W;
  localparam int unsigned BANK_WORDS = int'(TOTAL / 64'(N_BANKS));
  localparam int unsigned ROWS       = BANK_WORDS / COLS;
  localparam int unsigned BANK_W     = N_BANKS > 1 ? $clog2(N_BANKS) : 1;
  localparam int unsigned ROW_W      = ROWS > 1 ? $clog2(ROWS) : 1;
  localparam int unsigned COL_W      = COLS > 1 ? $clog2(COLS) : 1;

  // Address split {bank, row, column}.
  function automatic logic [COL_W-1:0] col_of(input logic [WADDR_W-1:0] a);
    return COL_W'(a % COLS);
  endfunction
  function automatic logic [ROW_W-1:0] row_of(input logic [WADDR_W-1:0] a);
    return ROW_W'((a / COLS) % ROWS);
  endfunction
  function automatic logic [BANK_W-1:0] bank_of(input logic [WADDR_W-1:0] a);
    return BANK_W'(a / BANK_WORDS);
  endfunction

  // ---- write register ----------------------------------------------------
  logic               wq_valid;
  wr_kind_e           wq_kind;
  logic [WADDR_W-1:0] wq_addr;
  logic [BIT_W-1:0]   wq_bit;
  logic [WORD_W-1:0]  wq_data;
  logic               wq_p, wq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq_valid <= 1'b0;
      wq_kind  <= WR_WORD;
      wq_addr  <= '0;
      wq_bit   <= '0;
      wq_data  <= '0;
      wq_p     <= 1'b0;
      wq_q     <= 1'b0;
    end else begin
      wq_valid <= wr_req;
      if (wr_req) begin
        wq_kind <= wr_kind;
        wq_addr <= wr_addr;
        wq_bit  <= wr_bit;
        wq_data <= wr_data;
        wq_p    <= wr_p;
        wq_q    <= wr_q;
      end
    end
  end

  // ---- write circuit -----------------------------------------------------
  logic              wc_en;
  logic [WORD_W-1:0] wc_mask, wc_p, wc_q;

  write_circuit #(.WORD_W(WORD_W)) u_write (
    .wr_valid(wq_valid),
    .wr_kind (wq_kind),
    .wr_bit  (wq_bit),
    .wr_data (wq_data),
    .p_in    (wq_p),
    .q_in    (wq_q),
    .wr_en   (wc_en),
    .wr_mask (wc_mask),
    .wr_p    (wc_p),
    .wr_q    (wc_q)
  );

  // ---- banks and block decoder --------------------------------------------
  logic [WORD_W-1:0]  bank_rd_data [N_BANKS];
  logic [N_BANKS-1:0] bank_wr_en;
  logic [WORD_W-1:0]  sel_rd_data;

  for (genvar k = 0; k < N_BANKS; k++) begin : g_bank
    rram_bank #(.WORD_W(WORD_W), .ROWS(ROWS), .COLS(COLS)) u_bank (
      .clk    (clk),
      .rd_row (row_of(rd_addr)),
      .rd_col (col_of(rd_addr)),
      .rd_data(bank_rd_data[k]),
      .wr_en  (bank_wr_en[k]),
      .wr_row (row_of(wq_addr)),
      .wr_col (col_of(wq_addr)),
      .wr_mask(wc_mask),
      .wr_p   (wc_p),
      .wr_q   (wc_q)
    );
  end

  block_decoder #(.N_BANKS(N_BANKS), .WORD_W(WORD_W)) u_block_dec (
    .rd_bank     (bank_of(rd_addr)),
    .bank_rd_data(bank_rd_data),
    .rd_data     (sel_rd_data),
    .wr_en       (wc_en),
    .wr_bank     (bank_of(wq_addr)),
    .bank_wr_en  (bank_wr_en)
  );

  // ---- read register ---------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_data <= '0;
    else if (rd_en) rd_data <= sel_rd_data;
  end

  // The memory is divided evenly: banks and columns are powers of two.
  initial begin
    assert (N_BANKS > 0 && (N_BANKS & (N_BANKS - 1)) == 0)
      else $error("N_BANKS must be a power of two");
    assert (COLS > 0 && (COLS & (COLS - 1)) == 0 && ROWS >= 1)
      else $error("COLS must be a power of two no larger than a bank");
  end

endmodule
