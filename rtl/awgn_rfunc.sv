// awgn_rfunc - R(u1) = sqrt(-2 ln u1) by piecewise-linear approximation,
// three pipeline stages (address generation, coefficient table, multiply-
// add).
//
// Hybrid segmentation: the interval (0,1) is cut logarithmically towards
// both ends, where R is steep. For u1 < 1/2 the segment is w = number of
// leading zeros of u1; for u1 >= 1/2 it is the number of leading zeros of
// v = 1 - u1. Each logarithmic segment is cut uniformly into L = 2^LB
// sub-segments. Scaling: the address generator shifts u1 (or v) left by w,
// so the multiplier always sees u_hat = 2^w u in [1/2, 1) and each segment
// stores the slope with respect to u_hat, 2^-w times the slope in u.
// R is then a_hat * u_hat + b with the segment's end points exact.
// Coefficients are two's complement Q(16,12), as in the document; they are
// computed at elaboration from the end points of each sub-segment, and the
// table is a constant ROM of 2 x 32 x L entries.
// Own choices: segments by leading-zero count, LB = 3, one formula for
// both halves via v = 1 - u1 (equivalent to the document's slope/offset
// adjustment for the upper half), 16-bit u_hat, output clamped at 0.
//
// Interface: x is u1 * 2^32 (0 is taken as 1). r is R in unsigned Q(16,12)
// three cycles after x, when en is high each cycle.
module awgn_rfunc #(
  parameter int LB = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] x,
  output logic [15:0] r
);

  localparam int L  = 1 << LB;
  localparam int AW = 1 + 5 + LB;

  typedef logic signed [15:0] coef_t [2**AW];

  // end points of sub-segment t of segment w on side sd, in u1
  function automatic real rval(bit sd, real v);
    // sd = 0: v is u1; sd = 1: v is 1 - u1
    return $sqrt(-2.0 * $ln(sd ? (1.0 - v) : v));
  endfunction

  function automatic logic signed [15:0] q12(real v);
    real s = v * 4096.0;
    s = s + ((s >= 0.0) ? 0.5 : -0.5);
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return 16'($rtoi(s));
  endfunction

  function automatic coef_t mk_coef(bit slope);
    coef_t c;
    for (int a = 0; a < 2**AW; a++) begin
      int w, t;
      bit sd;
      real ua, ub, va, vb, ra, rb, ah, bh;
      sd = 1'(a >> (5 + LB));
      w  = (a >> LB) & 31;
      t  = a & (L - 1);
      ua = 0.5 * (1.0 + real'(t) / L);          // u_hat at the ends
      ub = 0.5 * (1.0 + real'(t + 1) / L);
      va = ua / (2.0 ** w);                     // u1 or 1-u1 at the ends
      vb = ub / (2.0 ** w);
      if ((sd == 0 && w == 0) || (sd == 1 && w == 0)) begin
        // only u1 = 1/2 (side 1, v = 1/2) reaches here
        ah = 0.0; bh = rval(1'b0, 0.5);
      end else begin
        ra = rval(sd, va);
        rb = rval(sd, vb);
        ah = (rb - ra) / (ub - ua);
        bh = ra - ah * ua;
      end
      c[a] = slope ? q12(ah) : q12(bh);
    end
    return c;
  endfunction

  localparam coef_t A_ROM = mk_coef(1'b1);
  localparam coef_t B_ROM = mk_coef(1'b0);

  // stage 1: address generator
  logic [31:0] xn, v, nrm;
  logic        side;
  logic [4:0]  w;
  logic [AW-1:0] addr_q;
  logic [15:0]   uh_q;

  always_comb begin
    xn   = (x == 32'd0) ? 32'd1 : x;
    side = xn[31];
    v    = side ? (32'd0 - xn) : xn;          // 2^32 - x for the upper half
    if (side && xn == 32'h8000_0000) v = 32'h8000_0000;
    w = 5'd0;
    for (int k = 0; k < 32; k++)          // leading-zero count
      if (v[k]) w = 5'(31 - k);
    nrm = v << w;
  end

  // stage 2: coefficients, stage 3: multiply-add
  logic signed [15:0] a_q, b_q;
  logic [15:0]        uh2_q;
  logic signed [33:0] prod;
  logic signed [17:0] sum;

  assign prod = a_q * signed'({2'b00, uh2_q});
  assign sum  = 18'(prod >>> 16) + 18'(b_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0; uh_q <= '0; a_q <= '0; b_q <= '0; uh2_q <= '0; r <= '0;
    end else if (en) begin
      addr_q <= {side, w, nrm[30 -: LB]};
      uh_q   <= nrm[31:16];
      a_q    <= A_ROM[addr_q];
      b_q    <= B_ROM[addr_q];
      uh2_q  <= uh_q;
      r      <= sum[17] ? 16'd0 : (sum > 18'sd65535 ? 16'hFFFF : sum[15:0]);
    end
  end

endmodule
