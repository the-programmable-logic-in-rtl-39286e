// rm3_cell: logic function of one bipolar/complementary resistive switch.
//
// A switch with top electrode P, bottom electrode Q and stored state Z
// changes state only when P and Q differ: (P,Q) = (1,0) sets Z to 1,
// (P,Q) = (0,1) resets Z to 0, and (0,0) or (1,1) leave it alone. The state
// after the pulse is therefore the majority of P, not Q and Z:
//     zn = M3(p, ~q, z)
// This is the "resistive majority" RM3 the whole machine computes with.
// Combinational; the storage itself is the array that instantiates it.
module rm3_cell (
  input  logic p,   // top electrode (wordline) level
  input  logic q,   // bottom electrode (bitline) level
  input  logic z,   // present state
  output logic zn   // state after the pulse
);
  assign zn = (p & ~q) | (p & z) | (~q & z);
endmodule
