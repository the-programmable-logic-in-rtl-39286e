// write_circuit: drives the electrode levels for a write into the array.
//
// A whole-word store (WR_WORD) pulses every bit of the word with P = d and
// Q = ~d, so each switch ends at d whatever it held. A logic-in-memory write
// (WR_RM3) pulses only the addressed bit, with P = A on the wordline and
// Q = B on the bitline, so that bit becomes M3(A, ~B, Z). Bits outside the
// mask see no pulse (their lines are held at ground, P = Q = 0, which never
// switches a cell). Combinational: it takes the content of the write
// register and its outputs go to the banks in the same cycle.
// The use of the P = d, Q = ~d pulse for ordinary stores is this design's
// choice; the P = A, Q = B pulse is that of the architecture.
module write_circuit
  import plim_pkg::*;
#(
  parameter int unsigned WORD_W = 16
) (
  input  logic                       wr_valid,
  input  wr_kind_e                   wr_kind,
  input  logic [$clog2(WORD_W)-1:0]  wr_bit,   // bit position (WR_RM3)
  input  logic [WORD_W-1:0]          wr_data,  // word to store (WR_WORD)
  input  logic                       p_in,     // operand A (WR_RM3)
  input  logic                       q_in,     // operand B (WR_RM3)
  output logic                       wr_en,
  output logic [WORD_W-1:0]          wr_mask,
  output logic [WORD_W-1:0]          wr_p,
  output logic [WORD_W-1:0]          wr_q
);
  always_comb begin
    wr_en = wr_valid;
    if (wr_kind == WR_WORD) begin
      wr_mask = '1;
      wr_p    = wr_data;
      wr_q    = ~wr_data;
    end else begin
      wr_mask = WORD_W'(1) << wr_bit;
      wr_p    = {WORD_W{p_in}} & wr_mask;
      wr_q    = {WORD_W{q_in}} & wr_mask;
    end
    if (!wr_valid) begin
      wr_mask = '0;
      wr_p    = '0;
      wr_q    = '0;
    end
  end
endmodule
