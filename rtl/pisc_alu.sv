// pisc_alu: the ALU engine of a PISC.
//
// It provides the operations that the atomic updates of the evaluated graph
// algorithms need: floating-point add (PageRank, BC), integer add (TC, KC),
// unsigned min (CC), signed min (SSSP, Radii), bitwise or (Radii's visited
// bit vectors) and a move, plus compares that set the sequencer's flag:
// equal (BFS's "parent not yet assigned"), not equal, unsigned and signed
// less-than (SSSP's "new length shorter"). Which operations are needed
// follows the design; the function encoding (fn_e in omega_pkg) and the
// sharing of one fn field between ALU and compare are this implementation's.
//
// Purely combinational, 64-bit operands; narrower Props are zero- or
// sign-extended by the sequencer before they get here.
module pisc_alu
  import omega_pkg::*;
(
  input  fn_e          fn,
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [63:0]  y,     // ALU result
  output logic         flag   // compare result
);

  logic [63:0] fsum;

  fp64_add u_fadd (.a(a), .b(b), .y(fsum));

  always_comb begin
    unique case (fn)
      F_FADD:  y = fsum;
      F_ADD:   y = a + b;
      F_UMIN:  y = (a < b) ? a : b;
      F_SMIN:  y = ($signed(a) < $signed(b)) ? a : b;
      F_OR:    y = a | b;
      F_MOV:   y = a;
      default: y = a;
    endcase
    unique case (fn)
      F_FADD:  flag = (a == b);
      F_ADD:   flag = (a != b);
      F_UMIN:  flag = (a < b);
      F_SMIN:  flag = ($signed(a) < $signed(b));
      default: flag = 1'b0;
    endcase
  end

endmodule
