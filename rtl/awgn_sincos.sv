// awgn_sincos - cos(2 pi u2) and sin(2 pi u2) for the AWGN core, by table
// look-up, two pipeline stages.
//
// The top two bits of u2 select the quadrant and the next ten bits one of
// 1024 segments of the quarter cycle, as in the document. One constant
// table holds sin at the segment centres, (i + 1/2) / 1024 * pi/2, in
// Q(16,15) (largest entry clamped to 32767); cos of the same angle is the
// entry 1023 - i. The quadrant then swaps and negates the pair:
//   q=0: ( c,  s)   q=1: (-s,  c)   q=2: (-c, -s)   q=3: ( s, -c).
// Stage 1 registers the two table entries and the quadrant, stage 2 the
// signed results. Table values are computed at elaboration.
// Interface: u2 (32 bits) in; cos_o / sin_o signed Q(16,15) two cycles
// later, when en is high each cycle.
module awgn_sincos (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [31:0]        u2,
  output logic signed [15:0] cos_o,
  output logic signed [15:0] sin_o
);

  typedef logic [15:0] lut_t [1024];

  function automatic lut_t mk_lut();
    lut_t l;
    for (int i = 0; i < 1024; i++) begin
      real s;
      s = $sin((real'(i) + 0.5) / 1024.0 * 1.5707963267948966) * 32768.0 + 0.5;
      if (s > 32767.0) s = 32767.0;
      l[i] = 16'($rtoi(s));
    end
    return l;
  endfunction

  localparam lut_t SIN_LUT = mk_lut();

  logic [1:0]  q, q_q;
  logic [9:0]  idx;
  logic [15:0] s_q, c_q;

  assign q   = u2[31:30];
  assign idx = u2[29:20];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q <= '0; s_q <= '0; c_q <= '0; cos_o <= '0; sin_o <= '0;
    end else if (en) begin
      q_q <= q;
      s_q <= SIN_LUT[idx];
      c_q <= SIN_LUT[~idx];
      unique case (q_q)
        2'd0: begin cos_o <=  signed'(c_q); sin_o <=  signed'(s_q); end
        2'd1: begin cos_o <= -signed'(s_q); sin_o <=  signed'(c_q); end
        2'd2: begin cos_o <= -signed'(c_q); sin_o <= -signed'(s_q); end
        default: begin cos_o <= signed'(s_q); sin_o <= -signed'(c_q); end
      endcase
    end
  end

endmodule
