// tb_plim_computer: end-to-end runs of the PLiM computer at two reduced sizes.
//
// Part 1 (4-bit words, 4-bit addresses, one bank of 4 words): the one-
// instruction example of a 4 x 4 array. Words 0..2 hold the instruction
// @A = 1100, @B = 1111, @Z = 1101 and word 3 holds 0101; after running, word 3
// must read 0111 (bit 1 becomes RM3(1, 0, 0) = 1) and words 0..2 must be
// unchanged. Timing: 3 + 4 = 7 cycles and 6 memory accesses per instruction.
//
// Part 2 (8-bit words, 16-bit addresses so every address field is two words,
// 4 banks): a program made of the AND, OR, 1-bit XOR and 4-bit left-rotate
// instruction sequences, run for all four values of its inputs A and B with a
// random 4-bit Z, then a random RM3 program over all four banks compared with
// a software execution. Each mechanism is counted and must occur: switch to
// computing and back, constant 0 and constant 1 operands, bit set, bit reset
// and bit kept by an RM3 write, logic-mode writes into every bank, host
// stores and host reads.
module tb_plim_computer;
  import plim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ======================= part 1: 4 x 4 array ==============================
  logic       l4, e4, rw4, busy4;
  logic [1:0] a4, pc4;
  logic [3:0] wd4, rd4;
  plim_state_e st4;
  plim_computer #(.WORD_W(4), .ADDR_W(4), .N_BANKS(1), .COLS(1)) u4 (
    .clk, .rst_n, .lim(l4), .host_en(e4), .host_rw(rw4), .host_addr(a4),
    .host_wdata(wd4), .host_rdata(rd4), .busy(busy4), .pc(pc4), .state(st4));

  // ======================= part 2: 8-bit words, 2-word fields ================
  localparam int W = 8, AW = 16, WAW = 13, IW = 6, NB = 4;
  logic           l8, e8, rw8, busy8;
  logic [WAW-1:0] a8, pc8;
  logic [W-1:0]   wd8, rd8;
  plim_state_e    st8;
  plim_computer #(.WORD_W(W), .ADDR_W(AW), .N_BANKS(NB), .COLS(8)) u8 (
    .clk, .rst_n, .lim(l8), .host_en(e8), .host_rw(rw8), .host_addr(a8),
    .host_wdata(wd8), .host_rdata(rd8), .busy(busy8), .pc(pc8), .state(st8));

  // ---- mechanism counters (part 2) -------------------------------------------
  int n_mode_on = 0, n_mode_off = 0, n_const0 = 0, n_const1 = 0;
  int n_set = 0, n_reset = 0, n_keep = 0, n_host_wr = 0, n_host_rd = 0;
  int n_bank_rm3 [NB];
  plim_state_e st8_prev;
  always @(posedge clk) begin
    st8_prev <= st8;
    if (rst_n) begin
      if (st8 == ST_RESET_REGS && st8_prev == ST_MODE_CHECK) n_mode_on++;
      if (st8 == ST_STD && st8_prev == ST_MODE_CHECK) n_mode_off++;
      if (st8 == ST_READ_B && u8.u_ctrl.addr_a_q == 0) n_const0++;
      if (st8 == ST_READ_B && u8.u_ctrl.addr_a_q == 1) n_const1++;
      if (st8 == ST_WRITE_Z && u8.u_ctrl.addr_b_q == 0) n_const0++;
      if (st8 == ST_WRITE_Z && u8.u_ctrl.addr_b_q == 1) n_const1++;
      if (st8 == ST_STD && e8 && !rw8) n_host_wr++;
      if (st8 == ST_STD && e8 && rw8) n_host_rd++;
      if (u8.u_mem.wc_en && u8.u_mem.wq_kind == WR_RM3) begin
        logic oldb, newb;
        oldb = u8.u_mem.g_bank[0].u_bank.cur_word[0];
        for (int k = 0; k < NB; k++) if (u8.u_mem.bank_wr_en[k]) n_bank_rm3[k]++;
        // value of the addressed bit before and after the pulse
        case (u8.u_mem.bank_of(u8.u_mem.wq_addr))
          0: begin oldb = u8.u_mem.g_bank[0].u_bank.cur_word[u8.u_mem.wq_bit];
                   newb = u8.u_mem.g_bank[0].u_bank.next_word[u8.u_mem.wq_bit]; end
          1: begin oldb = u8.u_mem.g_bank[1].u_bank.cur_word[u8.u_mem.wq_bit];
                   newb = u8.u_mem.g_bank[1].u_bank.next_word[u8.u_mem.wq_bit]; end
          2: begin oldb = u8.u_mem.g_bank[2].u_bank.cur_word[u8.u_mem.wq_bit];
                   newb = u8.u_mem.g_bank[2].u_bank.next_word[u8.u_mem.wq_bit]; end
          default: begin oldb = u8.u_mem.g_bank[3].u_bank.cur_word[u8.u_mem.wq_bit];
                   newb = u8.u_mem.g_bank[3].u_bank.next_word[u8.u_mem.wq_bit]; end
        endcase
        if (!oldb && newb) n_set++;
        else if (oldb && !newb) n_reset++;
        else n_keep++;
      end
    end
  end

  // ---- host helpers for part 2 ---------------------------------------------------
  task automatic wr8(input int unsigned a, input logic [W-1:0] d);
    @(negedge clk);
    e8 = 1; rw8 = 0; a8 = WAW'(a); wd8 = d;
    @(negedge clk);
    e8 = 0;
  endtask

  task automatic rd8_word(input int unsigned a, output logic [W-1:0] d);
    @(negedge clk);
    e8 = 1; rw8 = 1; a8 = WAW'(a);
    @(negedge clk);
    e8 = 0;
    d = rd8;
  endtask

  // bit-level helpers: bit address = word * 8 + position
  task automatic set_bit8(input int unsigned ba, input logic v);
    logic [W-1:0] d;
    rd8_word(ba / W, d);
    d[ba % W] = v;
    wr8(ba / W, d);
    @(negedge clk);  // let the store reach the array before the next read
  endtask


  task automatic get_bit8(input int unsigned ba, output logic v);
    logic [W-1:0] d;
    rd8_word(ba / W, d);
    v = d[ba % W];
  endtask

  int unsigned prog_len;
  task automatic emit(input int unsigned fa, input int unsigned fb, input int unsigned fz);
    int unsigned base = prog_len * IW;
    wr8(base + 0, W'(fa >> 8)); wr8(base + 1, W'(fa));
    wr8(base + 2, W'(fb >> 8)); wr8(base + 3, W'(fb));
    wr8(base + 4, W'(fz >> 8)); wr8(base + 5, W'(fz));
    prog_len++;
  endtask

  task automatic run8();
    @(negedge clk);
    l8 = 1;
    wait (st8 == ST_FETCH && pc8 == WAW'((prog_len - 1) * IW));
    @(negedge clk);
    l8 = 0;
    wait (!busy8);
    @(negedge clk);
  endtask

  // Data bit addresses (bank = word / 2048), spread over the four banks.
  localparam int unsigned BA_A    = 2100 * 8 + 3;   // bank 1
  localparam int unsigned BA_B    = 4200 * 8 + 6;   // bank 2
  localparam int unsigned BA_AND  = 6300 * 8 + 0;   // bank 3
  localparam int unsigned BA_OR   = 6300 * 8 + 1;
  localparam int unsigned BA_XOR  = 300 * 8 + 7;    // bank 0
  localparam int unsigned BA_BINV = 7000 * 8 + 2;
  localparam int unsigned BA_T    = 7000 * 8 + 5;   // XOR temporary
  localparam int unsigned BA_X    = 5001 * 8 + 0;
  localparam int unsigned BA_Y    = 5001 * 8 + 1;
  localparam int unsigned BA_Z    = 5000 * 8 + 2;   // Z3..Z0 in bits 5..2 of word 5000

  initial begin
    logic [3:0] w4;
    logic [W-1:0] d;
    logic v;
    logic [3:0] z;
    int cyc, acc;
    l4 = 0; e4 = 0; rw4 = 1; a4 = 0; wd4 = 0;
    l8 = 0; e8 = 0; rw8 = 1; a8 = 0; wd8 = 0;
    for (int k = 0; k < NB; k++) n_bank_rm3[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // -------------------------- part 1 ----------------------------------
    begin
      logic [3:0] img [4] = '{4'b1100, 4'b1111, 4'b1101, 4'b0101};
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); e4 = 1; rw4 = 0; a4 = 2'(i); wd4 = img[i];
      end
      @(negedge clk); e4 = 0;
      @(negedge clk);
      cyc = 0; acc = 0;
      l4 = 1;
      fork
        begin
          wait (st4 == ST_FETCH && pc4 == 0);
          @(negedge clk); l4 = 0;
        end
        begin
          @(posedge clk);
          while (busy4 || cyc == 0) begin
            if (busy4) cyc++;
            if (u4.mem_rd_en || u4.mem_wr_req) acc++;
            @(posedge clk);
          end
        end
      join
      check("4x4 busy cycles (mode check, reset, 7 per instruction, mode check)", cyc, 7 + 3);
      check("4x4 memory accesses per instruction", acc, 6);
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); e4 = 1; rw4 = 1; a4 = 2'(i);
        @(negedge clk); e4 = 0; w4 = rd4;
        check($sformatf("4x4 word %0d", i), w4, (i == 3) ? 4'b0111 : img[i]);
      end
    end

    // -------------------------- part 2 ----------------------------------
    prog_len = 0;
    // AND: C = A.B
    emit(0, 1, BA_AND);  emit(0, 1, BA_BINV);  emit(1, BA_B, BA_BINV);  emit(BA_A, BA_BINV, BA_AND);
    // OR: C = A + B
    emit(1, 0, BA_OR);   emit(0, 1, BA_BINV);  emit(1, BA_B, BA_BINV);  emit(BA_A, BA_BINV, BA_OR);
    // 1-bit XOR: C = A xor B, with temporary T
    emit(0, 1, BA_T);    emit(BA_A, 0, BA_T);   emit(0, BA_B, BA_T);
    emit(0, 1, BA_XOR);  emit(BA_B, 0, BA_XOR); emit(0, BA_A, BA_XOR);  emit(BA_T, 0, BA_XOR);
    // 1-bit left rotate of Z3..Z0 with auxiliaries X and Y
    emit(0, 1, BA_X);         emit(1, BA_Z + 3, BA_X);
    emit(0, 1, BA_Y);         emit(1, BA_Z + 2, BA_Y);      emit(BA_Z + 2, BA_Y, BA_Z + 3);
    emit(0, 1, BA_Y);         emit(1, BA_Z + 1, BA_Y);      emit(BA_Z + 1, BA_Y, BA_Z + 2);
    emit(0, 1, BA_Y);         emit(1, BA_Z + 0, BA_Y);      emit(BA_Z + 0, BA_Y, BA_Z + 1);
    emit(0, 1, BA_Y);         emit(1, BA_X, BA_Y);          emit(BA_Y, BA_X, BA_Z + 0);

    for (int ab = 0; ab < 4; ab++) begin
      logic a = ab[1], b = ab[0];
      z = 4'($urandom);
      set_bit8(BA_A, a);
      set_bit8(BA_B, b);
      // random stale values in the results, to show they are overwritten
      set_bit8(BA_AND, 1'($urandom)); set_bit8(BA_OR, 1'($urandom)); set_bit8(BA_XOR, 1'($urandom));
      for (int k = 0; k < 4; k++) set_bit8(BA_Z + k, z[k]);
      acc = 0; cyc = 0;
      fork
        run8();
        begin
          @(posedge clk);
          while (busy8 || cyc == 0) begin
            if (busy8) cyc++;
            if (u8.mem_rd_en || u8.mem_wr_req) acc++;
            @(posedge clk);
          end
        end
      join
      check("program busy cycles", cyc, 10 * prog_len + 3);
      check("program memory accesses (9 per instruction)", acc, 9 * prog_len);
      get_bit8(BA_AND, v); check($sformatf("AND %0b.%0b", a, b), v, a & b);
      get_bit8(BA_OR, v);  check($sformatf("OR %0b+%0b", a, b), v, a | b);
      get_bit8(BA_XOR, v); check($sformatf("XOR %0b^%0b", a, b), v, a ^ b);
      rd8_word(5000, d);
      check($sformatf("rotate %b", z), d[5:2], {z[2:0], z[3]});
    end

    // Random program over all four banks, checked against software.
    begin
      int unsigned locs [16];
      logic sw [16];
      int unsigned fa, fb, fz;
      int ia, ib, iz;
      for (int i = 0; i < 16; i++) begin
        locs[i] = ((i % NB) * 2048 + 100 + 37 * i) * 8 + (i % 8);
        sw[i] = 1'($urandom);
        set_bit8(locs[i], sw[i]);
      end
      prog_len = 0;
      for (int n = 0; n < 150; n++) begin
        ia = $urandom_range(17); ib = $urandom_range(17); iz = $urandom_range(15);
        fa = (ia >= 16) ? ia - 16 : locs[ia];
        fb = (ib >= 16) ? ib - 16 : locs[ib];
        fz = locs[iz];
        sw[iz] = rm3((ia >= 16) ? 1'(ia - 16) : sw[ia], (ib >= 16) ? 1'(ib - 16) : sw[ib], sw[iz]);
        emit(fa, fb, fz);
      end
      run8();
      for (int i = 0; i < 16; i++) begin
        get_bit8(locs[i], v);
        check($sformatf("random program bit %0d", i), v, sw[i]);
      end
    end

    // Every mechanism must have happened.
    check("switches to computing seen", n_mode_on >= 5, 1);
    check("switches back to standard seen", n_mode_off >= 5, 1);
    check("constant 0 operands seen", n_const0 > 0, 1);
    check("constant 1 operands seen", n_const1 > 0, 1);
    check("RM3 bit set seen", n_set > 0, 1);
    check("RM3 bit reset seen", n_reset > 0, 1);
    check("RM3 bit kept seen", n_keep > 0, 1);
    check("host stores seen", n_host_wr > 0, 1);
    check("host reads seen", n_host_rd > 0, 1);
    for (int k = 0; k < NB; k++) check($sformatf("logic writes into bank %0d", k), n_bank_rm3[k] > 0, 1);
    $display("INFO mode on %0d off %0d const0 %0d const1 %0d set %0d reset %0d keep %0d host wr %0d rd %0d banks %0d %0d %0d %0d",
             n_mode_on, n_mode_off, n_const0, n_const1, n_set, n_reset, n_keep, n_host_wr, n_host_rd,
             n_bank_rm3[0], n_bank_rm3[1], n_bank_rm3[2], n_bank_rm3[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
