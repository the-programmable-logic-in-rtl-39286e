// block_decoder: bank selection of the multi-bank resistive memory.
//
// Every bank senses the word at the shared row/column address; the block
// decoder forwards the word of the bank named by rd_bank to the read
// register, and turns a write into the write enable of the one bank named by
// wr_bank. Purely combinational. Its place between the column decoders and
// the read register is that of the architecture; its two functions (read
// multiplexer, write enable decoder) are this design's reading of the name.
module block_decoder #(
  parameter int unsigned N_BANKS = 8,
  parameter int unsigned WORD_W  = 16
) (
  input  logic [(N_BANKS > 1 ? $clog2(N_BANKS) : 1)-1:0] rd_bank,
  input  logic [WORD_W-1:0]  bank_rd_data [N_BANKS],
  output logic [WORD_W-1:0]  rd_data,
  input  logic               wr_en,
  input  logic [(N_BANKS > 1 ? $clog2(N_BANKS) : 1)-1:0] wr_bank,
  output logic [N_BANKS-1:0] bank_wr_en
);
  always_comb begin
    rd_data = '0;
    for (int unsigned i = 0; i < N_BANKS; i++) begin
      if (rd_bank == i[$bits(rd_bank)-1:0]) rd_data = bank_rd_data[i];
    end
  end

  always_comb begin
    bank_wr_en = '0;
    for (int unsigned i = 0; i < N_BANKS; i++) begin
      bank_wr_en[i] = wr_en && (wr_bank == i[$bits(wr_bank)-1:0]);
    end
  end
endmodule
