// plim_computer: a resistive memory that can compute on its own content.
//
// The top joins the PLiM controller to the multi-bank resistive memory.
// With lim low it is a plain word-addressed RAM: host_en with host_rw = 1
// reads (data on host_rdata the next cycle), host_rw = 0 writes host_wdata
// (stored at the end of the following cycle). With lim high the controller
// runs the program stored in the array from word 0: each instruction
// @A, @B, @Z sets bit Z to M3(A, ~B, Z), the resistive majority that the
// memory cells compute natively when A is applied to their top electrode and
// B to their bottom electrode. Lowering lim stops execution after the
// current instruction; busy falls when the controller is back in standard
// mode. pc and state are status outputs for the host.
//
// Defaults: 16-bit words and 32-bit bit addresses, i.e. 2**32 bits in
// 2**28 words. The number of banks and the words per row are this design's
// choice.
module plim_computer
  import plim_pkg::*;
#(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned N_BANKS = 8,
  parameter int unsigned COLS    = 64
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                lim,
  input  logic                                host_en,
  input  logic                                host_rw,     // 1: read, 0: write
  input  logic [ADDR_W-$clog2(WORD_W)-1:0]    host_addr,   // word address
  input  logic [WORD_W-1:0]                   host_wdata,
  output logic [WORD_W-1:0]                   host_rdata,
  output logic                                busy,
  output logic [ADDR_W-$clog2(WORD_W)-1:0]    pc,
  output plim_state_e                         state
);
  localparam int unsigned BIT_W   = $clog2(WORD_W);
  localparam int unsigned WADDR_W = ADDR_W - BIT_W;

  logic               mem_rd_en;
  logic [WADDR_W-1:0] mem_rd_addr;
  logic [WORD_W-1:0]  mem_rd_data;
  logic               mem_wr_req;
  wr_kind_e           mem_wr_kind;
  logic [WADDR_W-1:0] mem_wr_addr;
  logic [BIT_W-1:0]   mem_wr_bit;
  logic [WORD_W-1:0]  mem_wr_data;
  logic               mem_wr_p, mem_wr_q;

  plim_controller #(.WORD_W(WORD_W), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n, .lim, .host_en, .host_rw, .host_addr, .host_wdata,
    .host_rdata, .busy, .pc, .state,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .mem_wr_req, .mem_wr_kind, .mem_wr_addr, .mem_wr_bit, .mem_wr_data,
    .mem_wr_p, .mem_wr_q
  );

  plim_memory #(.WORD_W(WORD_W), .ADDR_W(ADDR_W), .N_BANKS(N_BANKS), .COLS(COLS)) u_mem (
    .clk, .rst_n,
    .rd_en  (mem_rd_en),
    .rd_addr(mem_rd_addr),
    .rd_data(mem_rd_data),
    .wr_req (mem_wr_req),
    .wr_kind(mem_wr_kind),
    .wr_addr(mem_wr_addr),
    .wr_bit (mem_wr_bit),
    .wr_data(mem_wr_data),
    .wr_p   (mem_wr_p),
    .wr_q   (mem_wr_q)
  );

endmodule
