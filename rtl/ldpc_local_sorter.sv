// ldpc_local_sorter - local sorter of the accumulative CNU.
//
// Finds, among the N magnitudes of one VSS subgroup, the smallest and the
// second smallest value and the port number of each. Ports whose bit in
// en is low take no part. The search is a binary tree of 2-to-2 merges in
// which the lower-numbered side wins ties, so the result is the first two
// entries of the list ordered by (value, port). Purely combinational.
// The document gives the sorter's function; the tree and the tie rule are
// this design's choices. Outputs for an empty list are MAG_MAX / IDX_NONE.
module ldpc_local_sorter
  import ldpc_pkg::*;
#(
  parameter int N = PORTS
) (
  input  logic [N-1:0][MW-1:0] mag,
  input  logic [N-1:0]         en,
  input  logic [1:0]           grp,   // group number placed in the index
  output minpair_t             res
);

  // merge two ordered pairs; a wins ties
  function automatic minpair_t merge2(minpair_t a, minpair_t b);
    minpair_t o;
    if (b.m1 < a.m1) begin
      o.m1 = b.m1; o.i1 = b.i1;
      if (a.m1 <= b.m2) begin o.m2 = a.m1; o.i2 = a.i1; end
      else              begin o.m2 = b.m2; o.i2 = b.i2; end
    end else begin
      o.m1 = a.m1; o.i1 = a.i1;
      if (b.m1 < a.m2) begin o.m2 = b.m1; o.i2 = b.i1; end
      else             begin o.m2 = a.m2; o.i2 = a.i2; end
    end
    return o;
  endfunction

  localparam int L = (N <= 1) ? 1 : (1 << $clog2(N));

  minpair_t tree [2*L-1];

  always_comb begin
    for (int k = 0; k < L; k++) begin
      tree[L-1+k] = MINPAIR_EMPTY;
      if (k < N && en[k]) begin
        tree[L-1+k].m1 = mag[k];
        tree[L-1+k].i1 = {grp, 4'(k)};
      end
    end
    for (int k = L - 2; k >= 0; k--)
      tree[k] = merge2(tree[2*k+1], tree[2*k+2]);
  end

  assign res = tree[0];

endmodule
