// enable_generator: mux enables of the texels selector.
//
// Mux 1 delivers the explicit texel and is always enabled; mux 2 (right neighbour) is
// enabled when the row pair shares the line (cases I and II), mux 3 (lower neighbour) when the
// column pair shares it (cases I and III), mux 4 (diagonal) only in case I:
//   E1 = 1, E2 = ~s1, E3 = ~s0, E4 = ~s1 & ~s0   with cse = {s1, s0}.
// Follows the described design. Purely combinational.
module enable_generator
  import tex_pkg::*;
(
  input  case_e      cse,
  output logic [3:0] en    // en[0] = E1 ... en[3] = E4
);
  logic s1, s0;
  assign {s1, s0} = cse;
  assign en = {~s1 & ~s0, ~s0, ~s1, 1'b1};
endmodule
