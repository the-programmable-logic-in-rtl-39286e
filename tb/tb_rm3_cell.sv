// tb_rm3_cell: exhaustive check of the resistive-switch update against the
// two state tables of the switch (Z = 0: only (P,Q) = (1,0) sets it;
// Z = 1: only (P,Q) = (0,1) resets it).
module tb_rm3_cell;
  logic p, q, z, zn;
  int checks = 0, failures = 0;

  rm3_cell dut (.p, .q, .z, .zn);

  // Expected next state, written row by row from the state tables.
  //                        Z=0: PQ=00 01 10 11   Z=1: PQ=00 01 10 11
  localparam logic [7:0] EXP = {1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {z, p, q} = 3'(i);
      #1;
      checks++;
      if (zn !== EXP[i]) begin
        failures++;
        $display("FAIL p=%0b q=%0b z=%0b: zn=%0b expected %0b", p, q, z, zn, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
