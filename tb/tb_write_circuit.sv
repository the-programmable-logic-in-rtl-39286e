// tb_write_circuit: electrode levels for whole-word stores and single-bit
// resistive-majority writes, and no pulse without a request.
module tb_write_circuit;
  import plim_pkg::*;
  localparam int W = 16;
  logic         wr_valid;
  wr_kind_e     wr_kind;
  logic [3:0]   wr_bit;
  logic [W-1:0] wr_data;
  logic         p_in, q_in;
  logic         wr_en;
  logic [W-1:0] wr_mask, wr_p, wr_q;
  int checks = 0, failures = 0;

  write_circuit #(.WORD_W(W)) dut (.*);

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      wr_valid = (t % 7) != 3;
      wr_kind  = wr_kind_e'(t % 2);
      wr_bit   = 4'($urandom);
      wr_data  = W'($urandom);
      p_in     = 1'($urandom);
      q_in     = 1'($urandom);
      #1;
      expect_eq("en", W'(wr_en), W'(wr_valid));
      if (!wr_valid) begin
        expect_eq("idle mask", wr_mask, '0);
        expect_eq("idle p", wr_p, '0);
        expect_eq("idle q", wr_q, '0);
      end else if (wr_kind == WR_WORD) begin
        expect_eq("word mask", wr_mask, '1);
        expect_eq("word p", wr_p, wr_data);
        expect_eq("word q", wr_q, ~wr_data);
      end else begin
        expect_eq("rm3 mask", wr_mask, W'(1) << wr_bit);
        expect_eq("rm3 p", wr_p, p_in ? (W'(1) << wr_bit) : '0);
        expect_eq("rm3 q", wr_q, q_in ? (W'(1) << wr_bit) : '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
