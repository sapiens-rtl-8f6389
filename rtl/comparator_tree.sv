// comparator_tree: finds the largest of N unsigned values and its index.
//
// A binary tree of compare-select nodes, log2(N) levels deep. Each node keeps
// the larger input; on a tie it keeps the lower index. In the associative
// memory the inputs are the 32 per-class match counts, so the winner is the
// stored class with the smallest L1 distance to the query. N is padded to a
// power of two internally with zero-valued entries. Purely combinational.
module comparator_tree #(
  parameter int N = 32,
  parameter int W = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] val,
  output logic [W-1:0]        max_val,
  output logic [IW-1:0]       max_idx
);
  localparam int LEVELS = $clog2(N);
  localparam int NP     = 1 << LEVELS;

  logic [W-1:0]  v [LEVELS+1][NP];
  logic [IW-1:0] ix[LEVELS+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      v[0][i]  = (i < N) ? val[i] : '0;
      ix[0][i] = IW'(i);
    end
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < NP; i++) begin
        v[l+1][i]  = '0;
        ix[l+1][i] = '0;
      end
      for (int i = 0; i < (NP >> (l + 1)); i++) begin
        if (v[l][2*i+1] > v[l][2*i]) begin
          v[l+1][i]  = v[l][2*i+1];
          ix[l+1][i] = ix[l][2*i+1];
        end else begin
          v[l+1][i]  = v[l][2*i];
          ix[l+1][i] = ix[l][2*i];
        end
      end
    end
    max_val = v[LEVELS][0];
    max_idx = ix[LEVELS][0];
  end
endmodule
