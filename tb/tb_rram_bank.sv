// tb_rram_bank: a small bank (4 rows x 2 columns of 8-bit words) against a
// reference model: whole-word stores, random masked pulses with random
// electrode levels (each bit must follow the resistive-majority rule), and
// reads of every word.
module tb_rram_bank;
  localparam int W = 8, ROWS = 4, COLS = 2;
  logic         clk = 0;
  logic [1:0]   rd_row, wr_row;
  logic [0:0]   rd_col, wr_col;
  logic [W-1:0] rd_data;
  logic         wr_en;
  logic [W-1:0] wr_mask, wr_p, wr_q;
  logic [W-1:0] model [ROWS * COLS];
  int checks = 0, failures = 0;

  rram_bank #(.WORD_W(W), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int idx, input logic [W-1:0] m, input logic [W-1:0] p,
                       input logic [W-1:0] q);
    @(negedge clk);
    wr_en = 1; wr_row = 2'(idx / COLS); wr_col = 1'(idx % COLS);
    wr_mask = m; wr_p = p; wr_q = q;
    for (int b = 0; b < W; b++)
      if (m[b]) model[idx][b] = (p[b] & ~q[b]) | (p[b] & model[idx][b]) | (~q[b] & model[idx][b]);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic check_all();
    for (int i = 0; i < ROWS * COLS; i++) begin
      rd_row = 2'(i / COLS); rd_col = 1'(i % COLS);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("FAIL word %0d: %h expected %h", i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    logic [W-1:0] d;
    wr_en = 0; wr_mask = 0; wr_p = 0; wr_q = 0; wr_row = 0; wr_col = 0;
    rd_row = 0; rd_col = 0;
    // Stores: P = d, Q = ~d on every bit.
    for (int i = 0; i < ROWS * COLS; i++) begin
      d = W'($urandom);
      pulse(i, '1, d, ~d);
    end
    check_all();
    for (int t = 0; t < 300; t++) begin
      pulse($urandom_range(ROWS * COLS - 1), W'($urandom), W'($urandom), W'($urandom));
      if (t % 10 == 0) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
