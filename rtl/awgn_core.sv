// awgn_core - six-stage Box-Muller Gaussian noise generator.
//
// Produces two independent N(0, sigma^2) samples per cycle for fast
// bit-error-rate emulation:
//   theta = 2 pi u2,  R = sqrt(-2 ln u1),  X = R cos theta,  Y = R sin theta
// and then scales both by sigma. Pipeline (one register level per stage):
//   1  two uniform generators (awgn_urng) give u1 and u2
//   2  address generation for R; quadrant and segment for the angle
//   3  coefficient table for R; sine table read
//   4  R = a_hat * u_hat + b; quadrant applied to the sine pair
//   5  X = R cos, Y = R sin
//   6  multiply by sigma
// Formats: R unsigned Q(16,12); cos/sin Q(16,15); X, Y and outputs signed
// Q(16,12), saturated. Word length of u1 is 32 bits, so |X|, |Y| stay
// below sqrt(64 ln 2) = 6.66. The stage split follows the document's
// six-stage description; the exact formats and the sigma input
// (unsigned Q(16,12), loaded with seed_load) are this design's choices.
//
// Interface: seed_load loads both generator seeds and sigma. Every clock
// edge with en high advances the whole pipeline by one stage; the pair
// that the generators held after seed_load reaches the outputs at the
// fifth such edge (stage 1 is the generator state itself). out_valid is
// high for one cycle after each edge that produced a new valid pair.
module awgn_core (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seed_load,
  input  logic [127:0]       seed_u1,
  input  logic [127:0]       seed_u2,
  input  logic [15:0]        sigma,      // unsigned Q(16,12)
  input  logic               en,
  output logic               out_valid,
  output logic signed [15:0] noise_x,    // Q(16,12)
  output logic signed [15:0] noise_y
);

  logic [31:0]        u1, u2;
  logic [15:0]        r;
  logic signed [15:0] c, s;
  logic signed [15:0] x_q, y_q;
  logic [15:0]        sigma_q;
  logic [4:0]         vld_q;
  logic               new_q;

  awgn_urng u_u1 (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed_u1),
                  .en(en), .u(u1));
  awgn_urng u_u2 (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed_u2),
                  .en(en), .u(u2));

  // stages 2..4
  awgn_rfunc  u_r  (.clk(clk), .rst_n(rst_n), .en(en), .x(u1), .r(r));
  awgn_sincos u_sc (.clk(clk), .rst_n(rst_n), .en(en), .u2(u2), .cos_o(c), .sin_o(s));

  // the sine path has two stages; one more register aligns it with R
  logic signed [15:0] c_d, s_d;

  function automatic logic signed [15:0] sat16(logic signed [35:0] v);
    if (v > 36'sd32767)  return 16'sh7FFF;
    if (v < -36'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

  logic signed [35:0] px, py, nx, ny;
  assign px = 36'(signed'({1'b0, r})) * 36'(c_d);
  assign py = 36'(signed'({1'b0, r})) * 36'(s_d);
  assign nx = 36'(x_q) * 36'(signed'({1'b0, sigma_q}));
  assign ny = 36'(y_q) * 36'(signed'({1'b0, sigma_q}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_d <= '0; s_d <= '0; x_q <= '0; y_q <= '0;
      noise_x <= '0; noise_y <= '0; sigma_q <= '0; vld_q <= '0; new_q <= 1'b0;
    end else begin
      new_q <= en && !seed_load;
      if (seed_load) begin
        sigma_q <= sigma;
        vld_q   <= '0;
      end else if (en) begin
        vld_q <= {vld_q[3:0], 1'b1};           // pipeline fill count
      end
      if (en) begin
        c_d     <= c;
        s_d     <= s;
        x_q     <= sat16(px >>> 15);          // stage 5
        y_q     <= sat16(py >>> 15);
        noise_x <= sat16(nx >>> 12);          // stage 6
        noise_y <= sat16(ny >>> 12);
      end
    end
  end

  assign out_valid = vld_q[4] && new_q;

endmodule
