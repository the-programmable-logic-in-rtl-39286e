// plim_pkg: types and constants shared by the PLiM computer.
//
// The controller FSM states follow the state diagram of the PLiM controller:
// standard memory operation, mode check, register reset, instruction fetch
// (one state visited once per instruction word), operand A read, operand B
// read, write of Z with P=A and Q=B, and the program counter increment.
// A write request is either a whole-word store (standard RAM mode) or a
// single-bit resistive-majority update (logic-in-memory mode).
// Operand fields holding the values 0 and 1 are constants, not addresses
// (direct addressing); the numeric codes are this design's choice.
package plim_pkg;

  typedef enum logic [2:0] {
    ST_STD        = 3'd0,  // standard memory operations (LiM = 0)
    ST_MODE_CHECK = 3'd1,
    ST_RESET_REGS = 3'd2,
    ST_FETCH      = 3'd3,  // read instruction @PC, one word per cycle
    ST_READ_A     = 3'd4,
    ST_READ_B     = 3'd5,
    ST_WRITE_Z    = 3'd6,  // write @Z with P = A, Q = B
    ST_PC_INC     = 3'd7
  } plim_state_e;

  typedef enum logic {
    WR_WORD = 1'b0,  // store a whole word: P = data, Q = ~data on every bit
    WR_RM3  = 1'b1   // resistive majority on one bit: P = A, Q = B
  } wr_kind_e;

  // Operand field values that stand for constants instead of addresses.
  localparam int unsigned CONST0_CODE = 0;
  localparam int unsigned CONST1_CODE = 1;

  // Resistive majority: the value a switch holds after P and Q were applied.
  function automatic logic rm3(input logic p, input logic q, input logic z);
    return (p & ~q) | (p & z) | (~q & z);
  endfunction

endpackage
