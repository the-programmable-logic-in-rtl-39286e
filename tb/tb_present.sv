// tb_present: PRESENT-80 block encryption run inside the PLiM computer at
// its full default size (16-bit words, 32-bit bit addresses).
//
// The testbench generates the RM3 program, stores it from word 0 through the
// host port, then for each test block stores plaintext and key in an input
// area, raises lim for the whole program, and reads the ciphertext back.
// Results are compared with a software PRESENT model and with the published
// PRESENT-80 test vectors. The run also checks that every instruction took
// 10 cycles and 9 memory accesses and reports instruction count, R/W cycles
// and the resulting throughput at 1 ns per R/W cycle.
//
// Program (all data addressed bit by bit, operands 0 and 1 are constants):
//   copy plaintext and key to the working areas, counter := 1 (5 bits)
//   31 rounds of
//     addRoundKey  X[j] = S[j] xor K[16+j], with the 7-instruction XOR
//     sBoxLayer    Y = S(X) per nibble, 59 instructions per nibble
//     pLayer       S[P(j)] = Y[j], P(j) = 16 j mod 63, P(63) = 63 (copies)
//     KeyUpdate    K' = K rotated left by 61; K'[79:76] = S(K'[79:76]);
//                  K'[19:15] ^= counter; counter := counter + 1 (ripple
//                  incrementer of half adders), both in memory
//   final addRoundKey into the output area.
// Gate sequences used (fresh destination z, temporary t):
//   z = 0: (0, 1, z)          copy: (0,1,z) (a,0,z)     not: (0,1,z) (1,a,z)
//   and: (0,1,z) (a,0,z) (b,1,z)      or: (0,1,z) (a,0,z) (b,0,z)
//   xor5: (0,1,t) (a,b,t) (0,1,z) (b,a,z) (t,0,z)
//   xor7: (0,1,t) (a,0,t) (0,b,t) (0,1,z) (b,0,z) (0,a,z) (t,0,z)
// S-box network (input x3..x0, output y3..y0):
//   t1 = x1^x2; t2 = x2&t1; t3 = x3^t2; y0 = x0^t3; t4 = t1&t3; t5 = t1^y0;
//   t6 = t4^x2; t7 = x0|t6; y1 = t5^t7; t8 = t6^~x0; y3 = y1^t8;
//   t9 = t8|t5; y2 = t3^t9
module tb_present;
  import plim_pkg::*;
  localparam int W = 16, AW = 32, WAW = 28, IW = 6;

  logic           clk = 0, rst_n = 0;
  logic           lim, host_en, host_rw, busy;
  logic [WAW-1:0] host_addr, pc;
  logic [W-1:0]   host_wdata, host_rdata;
  plim_state_e    state;
  int checks = 0, failures = 0;

  plim_computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- software PRESENT -------------------------------------------------------
  localparam logic [3:0] SBOX [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                       4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  function automatic int unsigned perm(input int j);
    return (j == 63) ? 63 : (16 * j) % 63;
  endfunction

  function automatic logic [63:0] present_ref(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s, t;
    logic [79:0] k;
    s = pt; k = key;
    for (int i = 1; i <= 31; i++) begin
      s ^= k[79:16];
      for (int n = 0; n < 16; n++) s[4*n +: 4] = SBOX[s[4*n +: 4]];
      t = '0;
      for (int j = 0; j < 64; j++) t[perm(j)] = s[j];
      s = t;
      k = {k[18:0], k[79:19]};
      k[79:76] = SBOX[k[79:76]];
      k[19:15] ^= 5'(i);
    end
    return s ^ k[79:16];
  endfunction

  // ---- memory map (bit addresses) ---------------------------------------------
  localparam int unsigned DB     = 32'h8000_0000;
  localparam int unsigned IN_PT  = DB;          // 64 bits, word aligned
  localparam int unsigned IN_KEY = DB + 128;    // 80 bits
  localparam int unsigned OUT    = DB + 256;    // 64 bits
  localparam int unsigned ST     = DB + 512;    // state S
  localparam int unsigned XB     = DB + 640;    // after addRoundKey
  localparam int unsigned YB     = DB + 768;    // after sBoxLayer
  localparam int unsigned KB0    = DB + 1024;   // key buffers (ping-pong)
  localparam int unsigned KB1    = DB + 1152;
  localparam int unsigned CB0    = DB + 1280;   // counter buffers
  localparam int unsigned CB1    = DB + 1296;
  localparam int unsigned TMP    = DB + 1536;   // temporaries

  // ---- program generator ------------------------------------------------------
  int unsigned prog [$];   // 3 fields per instruction
  int n_ark = 0, n_sbox = 0, n_play = 0, n_key = 0, n_copy = 0;

  function automatic void e(input int unsigned a, input int unsigned b, input int unsigned z);
    prog.push_back(a); prog.push_back(b); prog.push_back(z);
  endfunction
  function automatic void g_copy(input int unsigned a, input int unsigned z);
    e(0, 1, z); e(a, 0, z);
  endfunction
  function automatic void g_not(input int unsigned a, input int unsigned z);
    e(0, 1, z); e(1, a, z);
  endfunction
  function automatic void g_and(input int unsigned a, input int unsigned b, input int unsigned z);
    e(0, 1, z); e(a, 0, z); e(b, 1, z);
  endfunction
  function automatic void g_or(input int unsigned a, input int unsigned b, input int unsigned z);
    e(0, 1, z); e(a, 0, z); e(b, 0, z);
  endfunction
  function automatic void g_xor5(input int unsigned a, input int unsigned b, input int unsigned z,
                                 input int unsigned t);
    e(0, 1, t); e(a, b, t); e(0, 1, z); e(b, a, z); e(t, 0, z);
  endfunction
  function automatic void g_xor7(input int unsigned a, input int unsigned b, input int unsigned z,
                                 input int unsigned t);
    e(0, 1, t); e(a, 0, t); e(0, b, t); e(0, 1, z); e(b, 0, z); e(0, a, z); e(t, 0, z);
  endfunction

  // S-box from bits x[3:0] = {i3,i2,i1,i0} to y = {o3,o2,o1,o0}.
  function automatic void g_sbox(input int unsigned i3, input int unsigned i2, input int unsigned i1,
                                 input int unsigned i0, input int unsigned o3, input int unsigned o2,
                                 input int unsigned o1, input int unsigned o0);
    int unsigned t1 = TMP + 1, t2 = TMP + 2, t3 = TMP + 3, t4 = TMP + 4, t5 = TMP + 5;
    int unsigned t6 = TMP + 6, t7 = TMP + 7, t8 = TMP + 8, t9 = TMP + 9, nd = TMP + 10;
    int unsigned xt = TMP + 0;
    g_xor5(i1, i2, t1, xt);
    g_and(i2, t1, t2);
    g_xor5(i3, t2, t3, xt);
    g_xor5(i0, t3, o0, xt);
    g_and(t1, t3, t4);
    g_xor5(t1, o0, t5, xt);
    g_xor5(t4, i2, t6, xt);
    g_or(i0, t6, t7);
    g_xor5(t5, t7, o1, xt);
    g_not(i0, nd);
    g_xor5(t6, nd, t8, xt);
    g_xor5(o1, t8, o3, xt);
    g_or(t8, t5, t9);
    g_xor5(t3, t9, o2, xt);
  endfunction

  function automatic void gen_present();
    int unsigned kc, kn, cc, cn, mark;
    prog.delete();
    mark = 0;
    for (int j = 0; j < 64; j++) g_copy(IN_PT + j, ST + j);
    for (int j = 0; j < 80; j++) g_copy(IN_KEY + j, KB0 + j);
    e(1, 0, CB0); for (int j = 1; j < 5; j++) e(0, 1, CB0 + j);
    n_copy = prog.size() / 3;
    kc = KB0; kn = KB1; cc = CB0; cn = CB1;
    for (int r = 1; r <= 31; r++) begin
      mark = prog.size();
      for (int j = 0; j < 64; j++) g_xor7(ST + j, kc + 16 + j, XB + j, TMP);
      n_ark += (prog.size() - mark) / 3; mark = prog.size();
      for (int n = 0; n < 16; n++)
        g_sbox(XB + 4*n + 3, XB + 4*n + 2, XB + 4*n + 1, XB + 4*n,
               YB + 4*n + 3, YB + 4*n + 2, YB + 4*n + 1, YB + 4*n);
      n_sbox += (prog.size() - mark) / 3; mark = prog.size();
      for (int j = 0; j < 64; j++) g_copy(YB + j, ST + perm(j));
      n_play += (prog.size() - mark) / 3; mark = prog.size();
      // KeyUpdate
      for (int j = 0; j < 76; j++) begin
        if (j >= 15 && j <= 19) g_xor7(kc + (j + 19) % 80, cc + j - 15, kn + j, TMP);
        else g_copy(kc + (j + 19) % 80, kn + j);
      end
      g_sbox(kc + 18, kc + 17, kc + 16, kc + 15, kn + 79, kn + 78, kn + 77, kn + 76);
      // counter + 1
      g_not(cc, cn);
      g_xor5(cc + 1, cc, cn + 1, TMP);
      g_and(cc + 1, cc, TMP + 20);
      g_xor5(cc + 2, TMP + 20, cn + 2, TMP);
      g_and(cc + 2, TMP + 20, TMP + 21);
      g_xor5(cc + 3, TMP + 21, cn + 3, TMP);
      g_and(cc + 3, TMP + 21, TMP + 22);
      g_xor5(cc + 4, TMP + 22, cn + 4, TMP);
      n_key += (prog.size() - mark) / 3;
      {kc, kn} = {kn, kc};
      {cc, cn} = {cn, cc};
    end
    mark = prog.size();
    for (int j = 0; j < 64; j++) g_xor7(ST + j, kc + 16 + j, OUT + j, TMP);
    n_ark += (prog.size() - mark) / 3;
  endfunction

  // ---- host access --------------------------------------------------------------
  task automatic host_store(input int unsigned a, input logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_rw = 0; host_addr = WAW'(a); host_wdata = d;
  endtask
  task automatic host_idle();
    @(negedge clk);
    host_en = 0;
    @(negedge clk);
  endtask
  task automatic host_load(input int unsigned a, output logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_rw = 1; host_addr = WAW'(a);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  task automatic encrypt(input logic [63:0] pt, input logic [79:0] key, output logic [63:0] ct,
                         output longint cycles, output longint accesses);
    logic [W-1:0] d;
    int unsigned ninstr = prog.size() / 3;
    for (int k = 0; k < 4; k++) host_store(IN_PT / W + k, pt[16*k +: 16]);
    for (int k = 0; k < 5; k++) host_store(IN_KEY / W + k, key[16*k +: 16]);
    host_idle();
    cycles = 0; accesses = 0;
    lim = 1;
    fork
      begin
        wait (state == ST_FETCH && pc == WAW'((ninstr - 1) * IW));
        @(negedge clk);
        lim = 0;
      end
      begin
        @(posedge clk);
        while (busy || cycles == 0) begin
          if (busy) cycles++;
          if (dut.mem_rd_en || dut.mem_wr_req) accesses++;
          @(posedge clk);
        end
      end
    join
    for (int k = 0; k < 4; k++) begin
      host_load(OUT / W + k, d);
      ct[16*k +: 16] = d;
    end
  endtask

  initial begin
    logic [63:0] ct, ref_ct;
    longint cyc, acc;
    int unsigned ninstr;
    logic [63:0] pts [3];
    logic [79:0] keys [3];
    logic [63:0] kat [3];
    lim = 0; host_en = 0; host_rw = 1; host_addr = 0; host_wdata = 0;
    pts[0] = 64'h0;                 keys[0] = 80'h0;                     kat[0] = 64'h5579C1387B228445;
    pts[1] = 64'hFFFFFFFFFFFFFFFF;  keys[1] = 80'hFFFFFFFFFFFFFFFFFFFF;  kat[1] = 64'h3333DCD3213210D2;
    pts[2] = {$urandom, $urandom};  keys[2] = {16'($urandom), $urandom, $urandom};
    kat[2] = present_ref(pts[2], keys[2]);
    repeat (3) @(negedge clk);
    rst_n = 1;

    gen_present();
    ninstr = prog.size() / 3;
    $display("INFO program: %0d RM3 instructions (copies %0d, addRoundKey %0d, sBoxLayer %0d, pLayer %0d, KeyUpdate %0d)",
             ninstr, n_copy, n_ark, n_sbox, n_play, n_key);
    foreach (prog[i]) begin
      host_store(2 * i, W'(prog[i] >> 16));
      host_store(2 * i + 1, W'(prog[i]));
    end
    host_idle();

    for (int v = 0; v < 3; v++) begin
      encrypt(pts[v], keys[v], ct, cyc, acc);
      ref_ct = present_ref(pts[v], keys[v]);
      checks++;
      if (ref_ct !== kat[v]) begin
        failures++;
        $display("FAIL software model %0d: %h expected %h", v, ref_ct, kat[v]);
      end
      checks++;
      if (ct !== kat[v]) begin
        failures++;
        $display("FAIL block %0d: pt %h key %h -> %h expected %h", v, pts[v], keys[v], ct, kat[v]);
      end
      checks++;
      if (acc != 9 * longint'(ninstr)) begin
        failures++;
        $display("FAIL R/W cycles %0d expected %0d", acc, 9 * ninstr);
      end
      checks++;
      if (cyc != 10 * longint'(ninstr) + 3) begin
        failures++;
        $display("FAIL clock cycles %0d expected %0d", cyc, 10 * ninstr + 3);
      end
      $display("INFO block %0d: ct %h, %0d R/W cycles, %0d clock cycles, %.1f kbps at 1 ns per R/W cycle",
               v, ct, acc, cyc, 64.0e6 / real'(acc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
