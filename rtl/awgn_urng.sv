// awgn_urng - 32-bit uniform random number generator for the AWGN core.
//
// A combined Tausworthe generator: four LFSR-type components of 31, 29,
// 28 and 25 effective bits, each advanced by one step of its recurrence per
// cycle, XORed together. The combination has period about 2^113, the
// period the document requires of its LFSR (the component parameters are
// those of the well-known "taus113" generator, taken from general
// knowledge, not from the document). Output u = value / 2^32.
//
// Interface: seed_load (with seed) loads the four 32-bit states at the
// clock edge; the low bits each component needs to be non-degenerate are
// forced to one. en advances the state one step. u is registered: it is
// the XOR of the current states, so it changes the cycle after en.
module awgn_urng (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [127:0] seed,
  input  logic         en,
  output logic [31:0]  u
);

  logic [31:0] z1, z2, z3, z4;
  logic [31:0] n1, n2, n3, n4;

  always_comb begin
    n1 = ((z1 & 32'hFFFF_FFFE) << 18) ^ (((z1 << 6)  ^ z1) >> 13);
    n2 = ((z2 & 32'hFFFF_FFF8) << 2)  ^ (((z2 << 2)  ^ z2) >> 27);
    n3 = ((z3 & 32'hFFFF_FFF0) << 7)  ^ (((z3 << 13) ^ z3) >> 21);
    n4 = ((z4 & 32'hFFFF_FF80) << 13) ^ (((z4 << 3)  ^ z4) >> 12);
  end

  assign u = z1 ^ z2 ^ z3 ^ z4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z1 <= 32'd12345; z2 <= 32'd12345; z3 <= 32'd12345; z4 <= 32'd12345;
    end else if (seed_load) begin
      z1 <= seed[31:0]   | 32'h0000_0002;
      z2 <= seed[63:32]  | 32'h0000_0008;
      z3 <= seed[95:64]  | 32'h0000_0010;
      z4 <= seed[127:96] | 32'h0000_0080;
    end else if (en) begin
      z1 <= n1; z2 <= n2; z3 <= n3; z4 <= n4;
    end
  end

endmodule
