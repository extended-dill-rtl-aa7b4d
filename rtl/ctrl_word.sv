// Instruction decoder of the sub-CPU.
//
// Purely combinational: the control word is a function of the immediate bit
// and the opcode (IR[8:6]) only.  The equations are the document's: registers
// are written by Load and Add (RW = IR7), the buses are steered to the adder
// for Add and to the comparator otherwise (AorC = IR6), MW is raised for Store,
// the write-back data is memory data for a Load (MorF), the immediate operand
// is used for a Load with IR8 set (LI), and the two flags are loaded by Add and
// Cmp.  MorF is written in a simplified but equivalent form.
module ctrl_word
  import dill_pkg::*;
(
  input  logic [2:0] ir_hi,  // IR[8:6]
  output ctrl_t      ctrl
);
  logic i8, i7, i6;
  assign {i8, i7, i6} = ir_hi;

  always_comb begin
    ctrl.rw    = i7;
    ctrl.aor_c = i6;
    ctrl.mw    = ~i7 & i6;
    ctrl.mor_f = i7 & ~i6;
    ctrl.li    = i8 & i7 & ~i6;
    ctrl.add   = i7 & i6;
    ctrl.cmp   = ~i7 & ~i6;
  end
endmodule
