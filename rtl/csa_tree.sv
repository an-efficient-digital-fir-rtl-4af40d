// csa_tree: carry-save reduction of a partial-product matrix to two rows.
//
// The N input rows are W-bit vectors that already carry every partial-product bit at its
// weight. Each level groups the rows in threes and replaces every group by a sum row and a
// carry row (a row of full adders; the carry row is shifted one place left), passing the one or
// two rows left over straight to the next level. Levels repeat until two rows remain; a final
// carry-propagate adder outside this module adds them. Bits that are constant zero (deleted or
// absent partial-product bits) are left to synthesis to prune, so the adders that remain are
// the full and half adders of a bit-level reduction of the same matrix.
//
// sum + carry equals the sum of all rows modulo 2^W. Purely combinational.
//
// Reducing the matrix height to two with carry-save adders follows the filter's design; the
// row-wise grouping (Wallace-style, three rows at a time) is this design's own choice.
module csa_tree #(
  parameter int N = 4,   // number of input rows
  parameter int W = 16   // row width
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Number of rows after s levels of reduction
  function automatic int rows_at(int s);
    int n = N;
    for (int k = 0; k < s; k++) n = (n / 3) * 2 + n % 3;
    return n;
  endfunction

  function automatic int num_levels();
    int n = N;
    int s = 0;
    while (n > 2) begin
      n = (n / 3) * 2 + n % 3;
      s++;
    end
    return s;
  endfunction

  localparam int NL = num_levels();

  for (genvar s = 0; s < NL; s++) begin : g_level
    localparam int NI = rows_at(s);
    localparam int NO = rows_at(s + 1);
    localparam int G  = NI / 3;
    logic [W-1:0] cur [N];
    logic [W-1:0] nxt [N];
    if (s == 0) begin : g_first
      assign cur = rows;
    end else begin : g_later
      assign cur = g_level[s-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_fa
      logic [W-1:0] a, b, c;
      assign a = cur[3*g];
      assign b = cur[3*g+1];
      assign c = cur[3*g+2];
      assign nxt[2*g]   = a ^ b ^ c;
      assign nxt[2*g+1] = {((a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) |
                            (b[W-2:0] & c[W-2:0])), 1'b0};
    end
    for (genvar q = 0; q < NI - 3 * G; q++) begin : g_pass
      assign nxt[2*G+q] = cur[3*G+q];
    end
    for (genvar u = NO; u < N; u++) begin : g_unused
      assign nxt[u] = '0;
    end
  end

  if (NL == 0) begin : g_flat
    // one or two rows: nothing to compress
    assign sum = rows[0];
    if (N > 1) begin : g_two
      assign carry = rows[N-1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_tree
    assign sum   = g_level[NL-1].nxt[0];
    assign carry = g_level[NL-1].nxt[1];
  end

endmodule
