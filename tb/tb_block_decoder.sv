// tb_block_decoder: random bank selections; the forwarded word must be the
// selected bank's and exactly the addressed bank may be write-enabled.
module tb_block_decoder;
  localparam int N = 4, W = 8;
  logic [1:0]   rd_bank, wr_bank;
  logic [W-1:0] bank_rd_data [N];
  logic [W-1:0] rd_data;
  logic         wr_en;
  logic [N-1:0] bank_wr_en;
  int checks = 0, failures = 0;

  block_decoder #(.N_BANKS(N), .WORD_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < N; k++) bank_rd_data[k] = W'($urandom);
      rd_bank = 2'($urandom);
      wr_bank = 2'($urandom);
      wr_en   = 1'($urandom);
      #1;
      checks++;
      if (rd_data !== bank_rd_data[rd_bank]) begin
        failures++;
        $display("FAIL read bank %0d: %h", rd_bank, rd_data);
      end
      checks++;
      if (bank_wr_en !== (wr_en ? (N'(1) << wr_bank) : '0)) begin
        failures++;
        $display("FAIL write enable bank %0d en %0b: %b", wr_bank, wr_en, bank_wr_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
