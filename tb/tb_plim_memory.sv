// tb_plim_memory: a 1 Kbit memory (8-bit words, 4 banks, 4 words per row)
// against a reference model. Stores to every word, then a random mix of
// whole-word stores, single-bit resistive-majority writes and reads. It also
// checks the register timing: read data one cycle after the request, held
// while no read is requested, and a write visible to a read issued two
// cycles after it.
module tb_plim_memory;
  import plim_pkg::*;
  localparam int W = 8, AW = 10, NB = 4, COLS = 4;
  localparam int WORDS = (1 << AW) / W;
  logic          clk = 0, rst_n = 0;
  logic          rd_en;
  logic [AW-4:0] rd_addr;
  logic [W-1:0]  rd_data;
  logic          wr_req;
  wr_kind_e      wr_kind;
  logic [AW-4:0] wr_addr;
  logic [2:0]    wr_bit;
  logic [W-1:0]  wr_data;
  logic          wr_p, wr_q;
  logic [W-1:0]  model [WORDS];
  int checks = 0, failures = 0;

  plim_memory #(.WORD_W(W), .ADDR_W(AW), .N_BANKS(NB), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    rd_en = 0; wr_req = 0;
  endtask

  task automatic store(input int a, input logic [W-1:0] d);
    @(negedge clk);
    idle(); wr_req = 1; wr_kind = WR_WORD; wr_addr = 7'(a); wr_data = d;
    model[a] = d;
    @(negedge clk); idle();
  endtask

  task automatic rm3_write(input int a, input int b, input logic p, input logic q);
    @(negedge clk);
    idle(); wr_req = 1; wr_kind = WR_RM3; wr_addr = 7'(a); wr_bit = 3'(b);
    wr_p = p; wr_q = q; wr_data = W'($urandom);
    model[a][b] = (p & ~q) | (p & model[a][b]) | (~q & model[a][b]);
    @(negedge clk); idle();
  endtask

  task automatic read_check(input int a);
    @(negedge clk);
    idle(); rd_en = 1; rd_addr = 7'(a);
    @(negedge clk); idle();
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("FAIL read word %0d: %h expected %h", a, rd_data, model[a]);
    end
    // Held while no read is requested, whatever the address.
    rd_addr = 7'(a ^ 1);
    @(negedge clk);
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("FAIL read register not held for word %0d", a);
    end
  endtask

  initial begin
    idle(); wr_kind = WR_WORD; wr_addr = 0; wr_bit = 0; wr_data = 0; wr_p = 0; wr_q = 0;
    rd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) store(a, W'($urandom));
    for (int a = 0; a < WORDS; a++) read_check(a);
    for (int t = 0; t < 1500; t++) begin
      case ($urandom_range(2))
        0: store($urandom_range(WORDS - 1), W'($urandom));
        1: rm3_write($urandom_range(WORDS - 1), $urandom_range(W - 1), 1'($urandom), 1'($urandom));
        default: read_check($urandom_range(WORDS - 1));
      endcase
    end
    for (int a = 0; a < WORDS; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
