// rz_compare_select: compare-and-select stage of the recursive-Z address translation.
//
// A comparator decides whether the texture is at least as wide as it is tall (m >= n) and a
// 2:1 mux passes the smaller of the two log2 dimensions. That smaller value k is the number of
// low bits of u and v that are cross-interleaved; m >= n also tells the differential field
// generator which coordinate supplies the remaining high bits. Purely combinational.
module rz_compare_select #(
  parameter int LOGW = 5
) (
  input  logic [LOGW-1:0] m,        // log2 texture width
  input  logic [LOGW-1:0] n,        // log2 texture height
  output logic [LOGW-1:0] k,        // min(m, n)
  output logic            m_ge_n    // width >= height
);
  always_comb begin
    m_ge_n = (m >= n);
    k      = m_ge_n ? n : m;
  end
endmodule
