// ldpc_ref_pkg - bit-accurate behavioural reference of the VSS normalised
// min-sum decoder with the RMAS1 check node sorter, used by testbenches.
//
// It walks an edge list built from the parity-check structure (has_row and
// cp_shift of ldpc_pkg) rather than the decoder's port and interconnect
// tables, keeps per check node the two stored min sets (L, O) and the
// input signs, and performs, per group, the same steps as the hardware:
// outgoing message = 0.75 x min over the other inputs, sign = product of the
// other signs; VNU sums; local sort of the new messages with ties to the
// earlier input; merge L before O with the O entries of L's group dropped.
// Sorting is written as sequential insertion, independent of the RTL trees.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  class ldpc_ref #(int P = 32, int ITER = 4);
    localparam int N = G * SLOTS * P;
    localparam int M = MB * P;

    // per check node: inputs of each group in port order (variable index, -1 = none)
    int chk_var [M][G][PORTS];
    int chk_cnt [M][G];
    // per check node state
    int l_m1[M], l_i1[M], l_m2[M], l_i2[M], l_g[M];
    int o_m1[M], o_i1[M], o_m2[M], o_i2[M];
    bit sgn [M][G][PORTS];
    int llr [N];
    bit hd [N];

    function new();
      for (int m = 0; m < M; m++)
        for (int g = 0; g < G; g++) begin
          chk_cnt[m][g] = 0;
          for (int k = 0; k < PORTS; k++) chk_var[m][g][k] = -1;
        end
      // edge list in slot order, which is the CNU port order
      for (int g = 0; g < G; g++)
        for (int s = 0; s < SLOTS; s++)
          for (int r = 0; r < MB; r++)
            if (has_row(s, g, r))
              for (int i = 0; i < P; i++) begin
                int m, n;
                m = r * P + i;
                n = (g * SLOTS + s) * P + (i + cp_shift(r, g * SLOTS + s, P)) % P;
                chk_var[m][g][chk_cnt[m][g]] = n;
                chk_cnt[m][g]++;
              end
    endfunction

    static function int sat_mag(int v);
      int a = (v < 0) ? -v : v;
      return (a > 31) ? 31 : a;
    endfunction

    // insert (v, idx) into an ordered pair, earlier insertions win ties
    static function void ins(int v, int idx, ref int m1, ref int i1, ref int m2, ref int i2);
      if (v < m1) begin m2 = m1; i2 = i1; m1 = v; i1 = idx; end
      else if (v < m2) begin m2 = v; i2 = idx; end
    endfunction

    // global pair of check m from L and O (first = empty)
    function void gpair(int m, bit first, output int m1, output int i1, output int m2, output int i2);
      m1 = 31; i1 = 63; m2 = 31; i2 = 63;
      if (first) return;
      ins(l_m1[m], l_i1[m], m1, i1, m2, i2);
      ins(l_m2[m], l_i2[m], m1, i1, m2, i2);
      if ((o_i1[m] >> 4) != l_g[m]) ins(o_m1[m], o_i1[m], m1, i1, m2, i2);
      if ((o_i2[m] >> 4) != l_g[m]) ins(o_m2[m], o_i2[m], m1, i1, m2, i2);
    endfunction

    // one cycle of group g; init = initialisation cycle
    function void step(int g, bit init, bit first);
      int gm1[M], gi1[M], gm2[M], gi2[M];
      int eps_sum [N];
      int eps_val [M][PORTS];
      for (int n = 0; n < N; n++) eps_sum[n] = 0;
      for (int m = 0; m < M; m++) begin
        bit par = 0;
        gpair(m, first, gm1[m], gi1[m], gm2[m], gi2[m]);
        for (int gg = 0; gg < G; gg++)
          for (int k = 0; k < PORTS; k++) par ^= sgn[m][gg][k];
        for (int k = 0; k < chk_cnt[m][g]; k++) begin
          int mg, e;
          mg = (gi1[m] == g * 16 + k) ? gm2[m] : gm1[m];
          e  = (mg * 3) / 4;
          if (par ^ sgn[m][g][k]) e = -e;
          if (init) e = 0;
          eps_val[m][k] = e;
          eps_sum[chk_var[m][g][k]] += e;
        end
      end
      for (int m = 0; m < M; m++) begin
        int a1, b1, a2, b2;
        a1 = 31; b1 = 63; a2 = 31; b2 = 63;
        for (int k = 0; k < PORTS; k++) sgn[m][g][k] = 0;
        for (int k = 0; k < chk_cnt[m][g]; k++) begin
          int n, z;
          n = chk_var[m][g][k];
          z = llr[n] + eps_sum[n] - eps_val[m][k];
          sgn[m][g][k] = (z < 0);
          ins(sat_mag(z), g * 16 + k, a1, b1, a2, b2);
        end
        o_m1[m] = gm1[m]; o_i1[m] = gi1[m]; o_m2[m] = gm2[m]; o_i2[m] = gi2[m];
        l_m1[m] = a1; l_i1[m] = b1; l_m2[m] = a2; l_i2[m] = b2; l_g[m] = g;
      end
      if (!init)
        for (int n = g * SLOTS * P; n < (g + 1) * SLOTS * P; n++)
          hd[n] = (llr[n] + eps_sum[n]) < 0;
    endfunction

    // decode one codeword of channel LLRs (-32..31)
    function void decode(int llr_in [N]);
      llr = llr_in;
      for (int g = 0; g < G; g++) step(g, 1'b1, g == 0);
      for (int it = 0; it < ITER; it++)
        for (int g = 0; g < G; g++) step(g, 1'b0, 1'b0);
    endfunction

    // 1 when hard-decision word x satisfies every parity check
    function bit is_codeword(bit x [N]);
      for (int m = 0; m < M; m++) begin
        bit par = 0;
        for (int g = 0; g < G; g++)
          for (int k = 0; k < chk_cnt[m][g]; k++) par ^= x[chk_var[m][g][k]];
        if (par) return 1'b0;
      end
      return 1'b1;
    endfunction
  endclass

endpackage
