// N-stage serial shift register of D flip-flops on the falling clock edge.
// d8 enters the first stage; at every falling edge of c each stage passes its
// bit to the next, and d0 is the last stage, so a bit appears at d0 N falling
// edges after it was presented at d8.  No reset, as in the document.
module shift_register8 #(
  parameter int unsigned N = 8
) (
  input  logic d8,
  input  logic c,
  output logic d0
);
  logic [N-1:0] st;  // st[N-1] is the first stage, st[0] drives d0
  always_ff @(negedge c) st <= {d8, st[N-1:1]};
  assign d0 = st[0];
endmodule
