// rz_placement_remap: low index bits of the recursive-Z placement variants.
//
// All variants keep the recursive-Z order between tiles and change only how texels are
// ordered inside the smallest tile, i.e. index bits a3..a0:
//   RZ    a3..a0 = v1 u1 v0 u0                 (input passed through)
//   RZU   a3..a0 = v1 u1 u0 (v0^u0)            (2x2 tiles traced as a U)
//   RZFU1 a3..a0 = v1 u1 u0 (u0^v0^v1)         (lower U of each 4x4 flipped)
//   RZFU2 a3..a0 = v1 u1 u0 ~(u0^v0^v1)        (upper U of each 4x4 flipped)
//   RZS4  a3..a0 = v1 v0 (v0^u1) (v0^u0)       (4x4 tiles in snake order)
// These bit patterns follow the described design. A variant needs its tile to fit in the
// texture: RZU needs k = min(m,n) >= 1, the others k >= 2. For smaller textures plain RZ bits
// are kept; that rule is this design's own. Purely combinational.
module rz_placement_remap
#(
  parameter int LOGW = 5
) (
  input  tex_pkg::placement_e      placement,
  input  logic [LOGW-1:0] k,        // min(m, n)
  input  logic [1:0]      u,        // u1 u0
  input  logic [1:0]      v,        // v1 v0
  input  logic [3:0]      low_in,   // RZ index bits a3..a0
  output logic [3:0]      low_out
);
  always_comb begin
    low_out = low_in;
    unique case (placement)
      tex_pkg::PL_RZU:   if (k >= LOGW'(1)) low_out = {low_in[3:2], u[0], v[0] ^ u[0]};
      tex_pkg::PL_RZFU1: if (k >= LOGW'(2)) low_out = {v[1], u[1], u[0], u[0] ^ v[0] ^ v[1]};
      tex_pkg::PL_RZFU2: if (k >= LOGW'(2)) low_out = {v[1], u[1], u[0], ~(u[0] ^ v[0] ^ v[1])};
      tex_pkg::PL_RZS4:  if (k >= LOGW'(2)) low_out = {v[1], v[0], v[0] ^ u[1], v[0] ^ u[0]};
      default:  low_out = low_in;
    endcase
  end
endmodule
