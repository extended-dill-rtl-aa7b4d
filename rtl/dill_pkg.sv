// Shared types and constants of the 4-bit sub-CPU.
//
// The instruction is 9 bits wide: bit 8 selects an immediate operand for a
// load, bits 7:6 are the opcode, 5:4 the destination register DR, 3:2 the
// source register SA and 1:0 the source register SB.  For a load with an
// immediate operand, bits 3:0 carry the 4-bit value.  The field layout and the
// opcode values follow the document; the struct names are this design's own.
package dill_pkg;

  localparam int unsigned DATA_W = 4;  // register, bus and memory width
  localparam int unsigned NUM_REG = 4; // R0..R3
  localparam int unsigned IR_W   = 9;

  typedef enum logic [1:0] {
    OP_CMP   = 2'b00,  // Flag0 <= (R[SA] == R[SB])
    OP_STORE = 2'b01,  // M[R[SA]] <= R[SB]
    OP_LOAD  = 2'b10,  // R[DR] <= IR[8] ? IR[3:0] : M[R[SA]]
    OP_ADD   = 2'b11   // {Flag1, R[DR]} <= R[SA] + R[SB]
  } opcode_e;

  typedef struct packed {
    logic    imm;  // IR[8]
    opcode_e op;   // IR[7:6]
    logic [1:0] dr;
    logic [1:0] sa;
    logic [1:0] sb;
  } instr_t;

  // Control word produced by the instruction decoder.
  typedef struct packed {
    logic rw;     // register write
    logic aor_c;  // 1: buses go to the adder, 0: to the comparator
    logic mw;     // memory write
    logic mor_f;  // write-back data from memory (1) or from the adder (0)
    logic li;     // load data is the immediate operand (1) or memory data (0)
    logic add;    // load Flag1
    logic cmp;    // load Flag0
  } ctrl_t;

endpackage
