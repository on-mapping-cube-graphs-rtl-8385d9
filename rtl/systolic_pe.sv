// systolic_pe: one processor of the linear systolic array.
//
// The processor has one input and one output port per label (l1, l2, l3) and
// no control state: in every cycle it applies the same function to whatever
// its three inputs hold,
//     so.l1 = si.l1
//     so.l2 = si.l2
//     so.l3 = si.l3 + si.l1 * si.l2      (modulo 2**DATA_W)
// which is the matrix-multiplication step of the document's examples (a and b
// pass on, the partial sum c picks up a*b). A partial sum that passes a
// processor where it has no work is kept unchanged by the host pumping a zero
// on l1 (or l2) to meet it there. The l1 and l2 outputs are the inputs passed
// straight through: those streams only carry operands past the processor.
//
// The processor is purely combinational; the clocked part of a processor-to-
// processor connection, its delay constant d_l, lives in delay_line, so that a
// value computed in cycle t reaches the next processor's input in cycle t+d_l.
// Word width (cube_map_pkg::DATA_W) and wrap-around arithmetic are this
// design's choice; the document leaves them open.
module systolic_pe
  import cube_map_pkg::*;
(
  input  port_triple_t si,
  output port_triple_t so
);

  always_comb begin
    so.l1 = si.l1;
    so.l2 = si.l2;
    so.l3 = si.l3 + si.l1 * si.l2;
  end

endmodule
