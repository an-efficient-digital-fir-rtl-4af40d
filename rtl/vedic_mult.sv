// vedic_mult: unsigned N x N multiplier by the Vedic "vertical and crosswise"
// (Urdhva Tiryakbhyam) method.
//
// The product is formed column by column, least significant first. Column k collects every
// crosswise bit product a[i]*b[j] with i + j = k (the "vertical and crosswise" pattern of the
// method) and adds the carry word handed on by column k-1. The LSB of that column sum is
// product bit p[k]; the remaining bits, shifted right by one, are the carry into column k+1.
// All column products are generated in parallel; the carry chain between columns is the
// critical path. Purely combinational; p is the full 2N-bit product.
//
// The use of Vedic multiplication follows the filter's proposal, which names the method but
// not its structure; the column-wise form with a carry word is the textbook formulation.
module vedic_mult #(
  parameter int N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // A column holds at most N products plus a carry below 2N, so CW bits suffice.
  localparam int CW = $clog2(2 * N + 1) + 1;

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    for (int k = 0; k < 2 * N; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
  end

endmodule
