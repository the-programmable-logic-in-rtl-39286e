// plim_controller: the Programmable Logic-in-Memory controller.
//
// With lim low the controller is transparent: host reads and writes go to
// the memory as in an ordinary RAM (state ST_STD). When lim goes high the FSM
// passes through a mode check, clears its work registers (PC = 0) and then
// executes, one after the other, the RM3 instructions stored in the memory:
//
//   ST_FETCH    read the INSTR_WORDS words of the instruction @A, @B, @Z at PC
//   ST_READ_A   read the word holding operand A
//   ST_READ_B   read the word holding operand B, latch A
//   ST_WRITE_Z  latch B, send the write "bit Z <- M3(A, ~B, Z)" (P = A, Q = B)
//   ST_PC_INC   PC advances by one instruction; the write reaches the array
//
// lim is sampled in ST_PC_INC: high continues with the next instruction, low
// returns through the mode check to standard operation. There is no halt
// instruction: the host ends a program by lowering lim, at the latest while
// the last instruction executes (pc shows the instruction's address).
//
// Instruction format: three fields of ADDR_W bits (bit addresses), each
// stored in ADDR_W / WORD_W consecutive words, most significant word first.
// A bit address is {word address, bit position}. A field value of 0 or 1
// in @A or @B stands for the constant 0 or 1 (direct addressing); the memory
// is still read in that cycle so every instruction takes the same time.
//
// Timing: the memory answers a read one cycle later (read register), so
// every fetched word or operand is taken from mem_rd_data in the cycle after
// it was requested. One instruction takes INSTR_WORDS + 4 clock cycles, of
// which INSTR_WORDS + 3 are memory accesses (9 for 16-bit words and 32-bit
// addresses). The state sequence, the register set (@A, A, @B, B, @Z, PC)
// and the P = A, Q = B write follow the architecture; the field encoding of
// constants, the word order and the cycle timing are this design's choice.
module plim_controller
  import plim_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned ADDR_W = 32
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // host side
  input  logic                                 lim,        // 1: compute
  input  logic                                 host_en,    // access request
  input  logic                                 host_rw,    // 1: read, 0: write
  input  logic [ADDR_W-$clog2(WORD_W)-1:0]     host_addr,  // word address
  input  logic [WORD_W-1:0]                    host_wdata,
  output logic [WORD_W-1:0]                    host_rdata, // valid the cycle after a read
  output logic                                 busy,       // not in standard mode
  output logic [ADDR_W-$clog2(WORD_W)-1:0]     pc,         // word address of current instruction
  output plim_state_e                          state,
  // memory side
  output logic                                 mem_rd_en,
  output logic [ADDR_W-$clog2(WORD_W)-1:0]     mem_rd_addr,
  input  logic [WORD_W-1:0]                    mem_rd_data,
  output logic                                 mem_wr_req,
  output wr_kind_e                             mem_wr_kind,
  output logic [ADDR_W-$clog2(WORD_W)-1:0]     mem_wr_addr,
  output logic [$clog2(WORD_W)-1:0]            mem_wr_bit,
  output logic [WORD_W-1:0]                    mem_wr_data,
  output logic                                 mem_wr_p,
  output logic                                 mem_wr_q
);
  localparam int unsigned BIT_W       = $clog2(WORD_W);
  localparam int unsigned WADDR_W     = ADDR_W - BIT_W;
  localparam int unsigned FIELD_WORDS = ADDR_W / WORD_W;
  localparam int unsigned INSTR_WORDS = 3 * FIELD_WORDS;
  localparam int unsigned IDX_W       = $clog2(INSTR_WORDS + 1);

  // Work registers
  plim_state_e        state_q;
  logic [WADDR_W-1:0] pc_q;
  logic [ADDR_W-1:0]  addr_a_q, addr_b_q, addr_z_q;   // @A, @B, @Z registers
  logic               a_q, b_q;                        // A, B registers (B is observed only:
                                                       // the write register captures it)
  logic [IDX_W-1:0]   fetch_idx_q;                     // word of the instruction being requested
  logic               cap_valid_q;                     // read register holds an instruction word
  logic [IDX_W-1:0]   cap_idx_q;                       // ... and which one

  assign state = state_q;
  assign pc    = pc_q;
  assign busy  = (state_q != ST_STD);
  assign host_rdata = mem_rd_data;

  function automatic logic [WADDR_W-1:0] word_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:BIT_W];
  endfunction
  function automatic logic [BIT_W-1:0] pos_of(input logic [ADDR_W-1:0] a);
    return a[BIT_W-1:0];
  endfunction
  // Operand value: constant for the field values 0 and 1, else the sensed bit.
  function automatic logic operand(input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] w);
    if (a == ADDR_W'(CONST0_CODE)) return 1'b0;
    if (a == ADDR_W'(CONST1_CODE)) return 1'b1;
    return w[pos_of(a)];
  endfunction

  logic a_val, b_val;
  assign a_val = operand(addr_a_q, mem_rd_data);
  assign b_val = operand(addr_b_q, mem_rd_data);

  // ---- memory requests -----------------------------------------------------
  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = '0;
    mem_wr_req  = 1'b0;
    mem_wr_kind = WR_WORD;
    mem_wr_addr = '0;
    mem_wr_bit  = '0;
    mem_wr_data = '0;
    mem_wr_p    = 1'b0;
    mem_wr_q    = 1'b0;
    unique case (state_q)
      ST_STD: begin
        mem_rd_en   = host_en && host_rw;
        mem_rd_addr = host_addr;
        mem_wr_req  = host_en && !host_rw;
        mem_wr_addr = host_addr;
        mem_wr_data = host_wdata;
      end
      ST_FETCH: begin
        mem_rd_en   = 1'b1;
        mem_rd_addr = pc_q + WADDR_W'(fetch_idx_q);
      end
      ST_READ_A: begin
        mem_rd_en   = 1'b1;
        mem_rd_addr = word_of(addr_a_q);
      end
      ST_READ_B: begin
        mem_rd_en   = 1'b1;
        mem_rd_addr = word_of(addr_b_q);
      end
      ST_WRITE_Z: begin
        mem_wr_req  = 1'b1;
        mem_wr_kind = WR_RM3;
        mem_wr_addr = word_of(addr_z_q);
        mem_wr_bit  = pos_of(addr_z_q);
        mem_wr_p    = a_q;
        mem_wr_q    = b_val;
      end
      default: ;
    endcase
  end

  // ---- FSM and registers -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_STD;
      pc_q        <= '0;
      addr_a_q    <= '0;
      addr_b_q    <= '0;
      addr_z_q    <= '0;
      a_q         <= 1'b0;
      b_q         <= 1'b0;
      fetch_idx_q <= '0;
      cap_valid_q <= 1'b0;
      cap_idx_q   <= '0;
    end else begin
      cap_valid_q <= (state_q == ST_FETCH);
      cap_idx_q   <= fetch_idx_q;

      // Instruction word arriving from the read register.
      if (cap_valid_q) begin
        if (cap_idx_q < IDX_W'(FIELD_WORDS))
          addr_a_q[(FIELD_WORDS - 1 - int'(cap_idx_q)) * WORD_W +: WORD_W] <= mem_rd_data;
        else if (cap_idx_q < IDX_W'(2 * FIELD_WORDS))
          addr_b_q[(2 * FIELD_WORDS - 1 - int'(cap_idx_q)) * WORD_W +: WORD_W] <= mem_rd_data;
        else
          addr_z_q[(3 * FIELD_WORDS - 1 - int'(cap_idx_q)) * WORD_W +: WORD_W] <= mem_rd_data;
      end

      unique case (state_q)
        ST_STD:        if (lim) state_q <= ST_MODE_CHECK;
        ST_MODE_CHECK: state_q <= lim ? ST_RESET_REGS : ST_STD;
        ST_RESET_REGS: begin
          pc_q        <= '0;
          addr_a_q    <= '0;
          addr_b_q    <= '0;
          addr_z_q    <= '0;
          a_q         <= 1'b0;
          b_q         <= 1'b0;
          fetch_idx_q <= '0;
          state_q     <= ST_FETCH;
        end
        ST_FETCH: begin
          if (fetch_idx_q == IDX_W'(INSTR_WORDS - 1)) begin
            fetch_idx_q <= '0;
            state_q     <= ST_READ_A;
          end else begin
            fetch_idx_q <= fetch_idx_q + 1'b1;
          end
        end
        ST_READ_A:  state_q <= ST_READ_B;
        ST_READ_B: begin
          a_q     <= a_val;
          state_q <= ST_WRITE_Z;
        end
        ST_WRITE_Z: begin
          b_q     <= b_val;
          state_q <= ST_PC_INC;
        end
        ST_PC_INC: begin
          pc_q    <= pc_q + WADDR_W'(INSTR_WORDS);
          state_q <= lim ? ST_FETCH : ST_MODE_CHECK;
        end
        default: state_q <= ST_STD;
      endcase
    end
  end

  // The memory serves one access per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(mem_rd_en && mem_wr_req));
  // An address field is a whole number of words.
  initial assert (ADDR_W % WORD_W == 0 && ADDR_W > $clog2(WORD_W))
    else $error("ADDR_W must be a multiple of WORD_W");

endmodule
