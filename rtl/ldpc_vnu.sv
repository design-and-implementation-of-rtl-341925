// ldpc_vnu - variable node unit (VNU2 / VNU3 / VNU4 by parameter DV).
//
// One VNU serves the variable node in the same slot position of all four
// VSS groups. It keeps the four channel LLRs of those nodes in a
// four-entry shift register and the four hard decisions in another, as the
// architecture describes: the entry at the head belongs to the group being
// processed, and the register rotates by one each decoding cycle.
//
// Each cycle it converts the DV incoming check-to-variable messages from
// sign-magnitude to two's complement, forms the a-posteriori sum
//   z_n  = P_n + sum_e eps_e
// and the outgoing messages z_mn = z_n - eps_m, which it returns to the CNUs
// in sign-magnitude form with the magnitude saturated to 5 bits. The hard
// decision is the sign of z_n (1 when negative). All of this is
// combinational; z is never stored (single pipelined architecture).
//
// Interface and timing:
//  * load   : initialisation cycle; llr_in enters the channel register and
//             is used directly, with all incoming messages taken as zero.
//  * dec    : decoding cycle; uses the head channel value and eps_in, then
//             rotates the channel register and shifts the new decision
//             into the decision register.
//  * hd     : decisions of groups 0..3 after the last decoding cycle.
// Widths (6-bit messages, 5-bit magnitudes) follow the document; the
// internal sum width and saturation of z_mn are this design's choices.
module ldpc_vnu
  import ldpc_pkg::*;
#(
  parameter int DV = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                dec,
  input  logic signed [W-1:0] llr_in,
  input  sm_t [DV-1:0]        eps_in,
  output sm_t [DV-1:0]        z_out,
  output logic [G-1:0]        hd
);

  localparam int SW = W + 3;  // room for P + four messages

  logic signed [W-1:0]  ch [G];
  logic signed [W-1:0]  p_cur;
  logic signed [SW-1:0] eps_tc [DV];
  logic signed [SW-1:0] zsum;
  logic                 hd_new;

  assign p_cur = load ? llr_in : ch[0];

  always_comb begin
    zsum = SW'(p_cur);
    for (int e = 0; e < DV; e++) begin
      if (load)
        eps_tc[e] = '0;
      else if (eps_in[e].sgn)
        eps_tc[e] = -SW'(signed'({1'b0, eps_in[e].mag}));
      else
        eps_tc[e] = SW'(signed'({1'b0, eps_in[e].mag}));
      zsum += eps_tc[e];
    end
    hd_new = zsum[SW-1];
  end

  always_comb begin
    for (int e = 0; e < DV; e++) begin
      logic signed [SW-1:0] zx;
      logic [SW-1:0]        a;
      zx = zsum - eps_tc[e];
      a  = zx[SW-1] ? SW'(-zx) : SW'(zx);
      z_out[e].sgn = zx[SW-1];
      z_out[e].mag = (a > SW'(MAG_MAX)) ? MAG_MAX : a[MW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < G; k++) ch[k] <= '0;
      hd <= '0;
    end else if (load || dec) begin
      for (int k = 0; k < G - 1; k++) ch[k] <= ch[k+1];
      ch[G-1] <= load ? llr_in : ch[0];
      if (dec) hd <= {hd_new, hd[G-1:1]};
    end
  end

endmodule
