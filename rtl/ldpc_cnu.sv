// ldpc_cnu - check node unit for normalised min-sum decoding with
// variable-node-centric sequential scheduling (VSS).
//
// A check node of degree 46 sees its inputs in four subgroups of 11 or 12,
// one subgroup per cycle. In the cycle of group grp the CNU
//  1. forms the check-to-variable messages of that group from its stored
//     state: magnitude = 0.75 x (second min if the port is the stored min's
//     own input, else min), sign = product of all other stored signs;
//  2. in the same cycle receives the group's new variable-to-check messages
//     z (sign-magnitude) computed by the VNUs from those messages, and
//     stores their local min pair (RMAS1) and signs (sign unit) at the clock
//     edge.
// Messages of subgroups already updated in the current iteration are thus
// new and those of later subgroups are from the previous one, as VSS
// requires. The scale 0.75 is applied as (3m) >> 2.
// Timing: eps is combinational from registers; z is captured at the edge
// when upd is high. first marks the first initialisation cycle.
// ROW (block row 0..3) fixes how many ports each group uses.
module ldpc_cnu
  import ldpc_pkg::*;
#(
  parameter int ROW = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd,
  input  logic             first,
  input  logic [1:0]       grp,
  input  sm_t [PORTS-1:0]  z_in,
  output sm_t [PORTS-1:0]  eps_out
);

  logic [PORTS-1:0]         en;
  logic [PORTS-1:0][MW-1:0] mag;
  logic [PORTS-1:0]         sgn_in, sgn_out;
  minpair_t                 gm;

  always_comb begin
    for (int k = 0; k < PORTS; k++) begin
      en[k]     = (k < row_cnt(ROW, int'(grp)));
      mag[k]    = z_in[k].mag;
      sgn_in[k] = z_in[k].sgn;
    end
  end

  ldpc_rmas1 u_mag (
    .clk(clk), .rst_n(rst_n), .upd(upd), .first(first), .grp(grp),
    .mag(mag), .en(en), .gm(gm)
  );

  ldpc_sign_unit u_sign (
    .clk(clk), .rst_n(rst_n), .upd(upd), .grp(grp),
    .sgn_in(sgn_in), .en(en), .sgn_out(sgn_out)
  );

  always_comb begin
    for (int k = 0; k < PORTS; k++) begin
      logic [MW-1:0] m;
      logic [MW+1:0] m3;
      m  = (gm.i1 == {grp, 4'(k)}) ? gm.m2 : gm.m1;
      m3 = 3 * (MW+2)'(m);
      eps_out[k].mag = m3[MW+1:2];
      eps_out[k].sgn = sgn_out[k];
    end
  end

endmodule
