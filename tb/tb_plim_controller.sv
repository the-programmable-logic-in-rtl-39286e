// tb_plim_controller: the controller alone, with 16-bit words and 32-bit
// addresses, against a reference memory in the testbench (read register one
// cycle after the request, writes committed one cycle after the request,
// resistive-majority bit update). The host stores a random program of RM3
// instructions over a small data area (with constant operands mixed in),
// runs it, and compares the data area with a software execution of the same
// program. It checks the host path in standard mode, the FSM state order
// (Fig.-3 sequence), and the timing: INSTR_WORDS + 4 = 10 cycles and
// 9 memory accesses per instruction.
module tb_plim_controller;
  import plim_pkg::*;
  localparam int W = 16, AW = 32, WAW = AW - 4;
  localparam int IW = 6;                 // instruction words
  localparam int NINSTR = 300;
  localparam int DATA_WORD = 4096;       // data area: words 4096..4099 (64 bits)
  localparam int NDATA = 64;

  logic           clk = 0, rst_n = 0;
  logic           lim, host_en, host_rw;
  logic [WAW-1:0] host_addr;
  logic [W-1:0]   host_wdata, host_rdata;
  logic           busy;
  logic [WAW-1:0] pc;
  plim_state_e    state;
  logic           mem_rd_en;
  logic [WAW-1:0] mem_rd_addr;
  logic [W-1:0]   mem_rd_data;
  logic           mem_wr_req;
  wr_kind_e       mem_wr_kind;
  logic [WAW-1:0] mem_wr_addr;
  logic [3:0]     mem_wr_bit;
  logic [W-1:0]   mem_wr_data;
  logic           mem_wr_p, mem_wr_q;
  int checks = 0, failures = 0;

  plim_controller #(.WORD_W(W), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  // ---- reference memory -------------------------------------------------
  logic [W-1:0] mem [int unsigned];
  logic         pend;
  wr_kind_e     pend_kind;
  logic [WAW-1:0] pend_addr;
  logic [3:0]   pend_bit;
  logic [W-1:0] pend_data;
  logic         pend_p, pend_q;

  function automatic logic [W-1:0] rd(input int unsigned a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  always @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= rd(mem_rd_addr);
    if (pend) begin
      if (pend_kind == WR_WORD) mem[pend_addr] = pend_data;
      else begin
        logic [W-1:0] w;
        w = rd(pend_addr);
        w[pend_bit] = rm3(pend_p, pend_q, w[pend_bit]);
        mem[pend_addr] = w;
      end
    end
    pend      <= mem_wr_req;
    pend_kind <= mem_wr_kind;
    pend_addr <= mem_wr_addr;
    pend_bit  <= mem_wr_bit;
    pend_data <= mem_wr_data;
    pend_p    <= mem_wr_p;
    pend_q    <= mem_wr_q;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors ---------------------------------------------------------
  int accesses = 0, busy_cycles = 0;
  plim_state_e prev_state;
  int order_errors = 0;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      busy_cycles++;
      if (mem_rd_en || mem_wr_req) accesses++;
    end
    prev_state <= state;
    // Fig. 3 order: each state may only follow its predecessor.
    if (rst_n && state != prev_state) begin
      case (state)
        ST_MODE_CHECK: if (!(prev_state inside {ST_STD, ST_PC_INC})) order_errors++;
        ST_RESET_REGS: if (prev_state != ST_MODE_CHECK) order_errors++;
        ST_FETCH:      if (!(prev_state inside {ST_RESET_REGS, ST_PC_INC})) order_errors++;
        ST_READ_A:     if (prev_state != ST_FETCH) order_errors++;
        ST_READ_B:     if (prev_state != ST_READ_A) order_errors++;
        ST_WRITE_Z:    if (prev_state != ST_READ_B) order_errors++;
        ST_PC_INC:     if (prev_state != ST_WRITE_Z) order_errors++;
        ST_STD:        if (prev_state != ST_MODE_CHECK) order_errors++;
        default: order_errors++;
      endcase
    end
  end

  // ---- host helpers ------------------------------------------------------
  task automatic host_write(input int unsigned a, input logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_rw = 0; host_addr = WAW'(a); host_wdata = d;
    @(negedge clk);
    host_en = 0;
  endtask

  task automatic host_read(input int unsigned a, output logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_rw = 1; host_addr = WAW'(a);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  // Software image of the data area.
  logic [NDATA-1:0] sw;

  function automatic int unsigned rand_operand();
    int r = $urandom_range(9);
    if (r == 0) return CONST0_CODE;
    if (r == 1) return CONST1_CODE;
    return DATA_WORD * W + $urandom_range(NDATA - 1);
  endfunction

  function automatic logic sw_val(input int unsigned a);
    if (a == CONST0_CODE) return 1'b0;
    if (a == CONST1_CODE) return 1'b1;
    return sw[a - DATA_WORD * W];
  endfunction

  initial begin
    int unsigned fa, fb, fz;
    logic [W-1:0] d;
    lim = 0; host_en = 0; host_rw = 1; host_addr = 0; host_wdata = 0;
    pend = 0; mem_rd_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Data area through the host port.
    sw = {$urandom, $urandom};
    for (int k = 0; k < NDATA / W; k++) host_write(DATA_WORD + k, sw[k * W +: W]);
    host_read(DATA_WORD + 1, d);
    checks++;
    if (d !== sw[W +: W]) begin
      failures++;
      $display("FAIL host read in standard mode: %h expected %h", d, sw[W +: W]);
    end

    // Program: random RM3 instructions, executed in software alongside.
    for (int i = 0; i < NINSTR; i++) begin
      fa = rand_operand();
      fb = rand_operand();
      fz = DATA_WORD * W + $urandom_range(NDATA - 1);
      sw[fz - DATA_WORD * W] = rm3(sw_val(fa), sw_val(fb), sw[fz - DATA_WORD * W]);
      host_write(i * IW + 0, W'(fa >> 16)); host_write(i * IW + 1, W'(fa));
      host_write(i * IW + 2, W'(fb >> 16)); host_write(i * IW + 3, W'(fb));
      host_write(i * IW + 4, W'(fz >> 16)); host_write(i * IW + 5, W'(fz));
    end
    @(negedge clk);
    busy_cycles = 0; accesses = 0;

    // Run.
    lim = 1;
    wait (state == ST_FETCH && pc == WAW'((NINSTR - 1) * IW));
    @(negedge clk);
    lim = 0;
    wait (!busy);
    @(negedge clk);

    checks++;
    if (accesses != 9 * NINSTR) begin
      failures++;
      $display("FAIL memory accesses %0d expected %0d", accesses, 9 * NINSTR);
    end
    // mode check + reset regs + 10 per instruction + final mode check
    checks++;
    if (busy_cycles != 10 * NINSTR + 3) begin
      failures++;
      $display("FAIL busy cycles %0d expected %0d", busy_cycles, 10 * NINSTR + 3);
    end
    checks++;
    if (order_errors != 0) begin
      failures++;
      $display("FAIL %0d FSM state order errors", order_errors);
    end
    for (int k = 0; k < NDATA / W; k++) begin
      host_read(DATA_WORD + k, d);
      checks++;
      if (d !== sw[k * W +: W]) begin
        failures++;
        $display("FAIL data word %0d: %h expected %h", k, d, sw[k * W +: W]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
