// ldpc_decoder - single pipelined VSS decoder for the rate-15/16
// (2048,1920) quasi-cyclic LDPC code, normalised min-sum, 4 iterations.
//
// Structure: MB*P = 128 check node units work fully in parallel; SLOTS*P =
// 512 variable node units (4P VNU4, 6P VNU3, 6P VNU2) serve one VSS group
// of 512 variable nodes per cycle. Each cycle of group g the CNUs drive the
// check-to-variable messages of that group through the c2v interconnect,
// the VNUs add them to the channel LLRs and return new variable-to-check
// messages through the v2c interconnect, and the CNUs sort and store them
// at the clock edge - one cycle per group, with no message memory between
// VNUs and CNUs (z is never stored).
//
// Interface and timing:
//  * llr_in carries the 512 channel LLRs of one group (6-bit two's
//    complement, 1 fractional bit, positive = bit 0), index s*P + j, and is
//    taken when in_valid && in_ready; groups 0..3 of a codeword are sent in
//    order. A codeword is 4 such transfers.
//  * After the G init cycles the decoder runs ITER*G cycles, then pulses
//    out_valid. out_bits holds the hard decisions of all N = 2048 bits,
//    index (g*16 + s)*P + j, from the out_valid cycle until the first
//    decoding cycle of the next codeword.
//  * With in_valid held high a codeword completes every 20 cycles.
// Bit order is the permuted column order of ldpc_pkg.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int P    = 32,
  parameter int ITER = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [SLOTS*P-1:0][W-1:0] llr_in,
  output logic                          out_valid,
  output logic [G*SLOTS*P-1:0]          out_bits
);

  logic       load, first, dec;
  logic [1:0] grp;

  sm_t [SLOTS*P-1:0][DVMAX-1:0] vz, ve;
  sm_t [MB*P-1:0][PORTS-1:0]    cz, ce;

  ldpc_ctrl #(.ITER(ITER)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .load(load), .first(first), .dec(dec), .grp(grp), .out_valid(out_valid)
  );

  for (genvar s = 0; s < SLOTS; s++) begin : g_slot
    localparam int DV = slot_deg(s);
    for (genvar j = 0; j < P; j++) begin : g_vnu
      logic [G-1:0] hd;
      ldpc_vnu #(.DV(DV)) u_vnu (
        .clk(clk), .rst_n(rst_n), .load(load), .dec(dec),
        .llr_in(llr_in[s*P+j]),
        .eps_in(ve[s*P+j][DV-1:0]),
        .z_out(vz[s*P+j][DV-1:0]),
        .hd(hd)
      );
      if (DV < DVMAX) begin : g_pad
        assign vz[s*P+j][DVMAX-1:DV] = '0;
      end
      for (genvar g = 0; g < G; g++) begin : g_out
        assign out_bits[(g*SLOTS+s)*P+j] = hd[g];
      end
    end
  end

  ldpc_v2c_net #(.P(P)) u_v2c (.grp(grp), .vz(vz), .cz(cz));
  ldpc_c2v_net #(.P(P)) u_c2v (.grp(grp), .ce(ce), .ve(ve));

  for (genvar r = 0; r < MB; r++) begin : g_row
    for (genvar i = 0; i < P; i++) begin : g_cnu
      ldpc_cnu #(.ROW(r)) u_cnu (
        .clk(clk), .rst_n(rst_n), .upd(load || dec), .first(first),
        .grp(grp), .z_in(cz[r*P+i]), .eps_out(ce[r*P+i])
      );
    end
  end

endmodule
