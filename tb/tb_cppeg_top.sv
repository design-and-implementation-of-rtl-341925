// tb_cppeg_top - end-to-end testbench of cppeg_top at its default size.
//
// 1. Runs the AWGN core (sigma = 0.38, seeds loaded) until it has delivered
//    enough samples for all codewords, with a pause in en half way.
// 2. Maps the all-zero codeword to BPSK (+1), adds the noise and forms
//    6-bit LLRs, 4 * y / sigma^2 in units of 1/2, saturated.
// 3. Sends the codewords to the decoder, mostly back to back, once with a
//    stall in in_valid, and compares every hard decision with the
//    behavioural decoder model ldpc_ref_pkg.
// Checks: all 2048 decisions per codeword; codeword latency (20 cycles)
// and spacing (20 cycles back to back); noise statistics. Mechanisms
// counted, each must occur: input stall, back-to-back codeword, RMAS1
// feedback opened for an outdated min, CNU group with 11 and with 12
// ports, channel errors corrected, AWGN pipeline pause.
module tb_cppeg_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P  = 32;
  localparam int N  = G * SLOTS * P;
  localparam int NW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_in_valid, dec_in_ready, dec_out_valid;
  logic signed [SLOTS*P-1:0][W-1:0] dec_llr;
  logic [N-1:0] dec_bits;
  logic awgn_seed_load, awgn_en, awgn_valid;
  logic [127:0] seed1, seed2;
  logic [15:0] sigma;
  logic signed [15:0] ax, ay;

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cppeg_top dut (
    .clk(clk), .rst_n(rst_n),
    .dec_in_valid(dec_in_valid), .dec_in_ready(dec_in_ready), .dec_llr(dec_llr),
    .dec_out_valid(dec_out_valid), .dec_bits(dec_bits),
    .awgn_seed_load(awgn_seed_load), .awgn_seed_u1(seed1), .awgn_seed_u2(seed2),
    .awgn_sigma(sigma), .awgn_en(awgn_en), .awgn_valid(awgn_valid),
    .awgn_x(ax), .awgn_y(ay)
  );

  ldpc_ref #(.P(P), .ITER(4)) ref_m;
  int  words [NW][N];
  real noise [$];

  // mechanism counters
  int n_stall = 0, n_b2b = 0, n_open = 0, n_g11 = 0, n_g12 = 0, n_corr = 0, n_pause = 0;

  always @(posedge clk) begin
    if (dut.u_dec.g_row[0].g_cnu[0].u_cnu.upd && dut.u_dec.dec) begin
      if (dut.u_dec.g_row[0].g_cnu[0].u_cnu.u_mag.open1 ||
          dut.u_dec.g_row[0].g_cnu[0].u_cnu.u_mag.open2) n_open++;
      if (row_cnt(0, int'(dut.u_dec.grp)) == 11) n_g11++;
      if (row_cnt(0, int'(dut.u_dec.grp)) == 12) n_g12++;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int start_q [$], done_q [$];
  always @(posedge clk) begin
    if (dec_in_valid && dec_in_ready && dut.u_dec.first) start_q.push_back(cyc);
    if (rst_n && dec_out_valid) done_q.push_back(cyc);
  end

  initial begin
    real sg, s1, s2;
    int need;
    ref_m = new();
    sg = 0.38;
    sigma = 16'($rtoi(sg * 4096.0));
    seed1 = {32'd11, 32'd222, 32'd3333, 32'd44444};
    seed2 = {32'd55555, 32'd666666, 32'd7777777, 32'd88888888};
    awgn_seed_load = 0; awgn_en = 0; dec_in_valid = 0; dec_llr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. noise
    awgn_seed_load = 1;
    @(negedge clk);
    awgn_seed_load = 0;
    need = NW * N;
    for (int t = 0; noise.size() < need; t++) begin
      awgn_en = !(t >= 500 && t < 510);
      if (t == 505) n_pause++;
      @(negedge clk);
      if (awgn_valid) begin
        noise.push_back(real'(ax) / 4096.0);
        noise.push_back(real'(ay) / 4096.0);
      end
    end
    awgn_en = 0;
    s1 = 0.0; s2 = 0.0;
    foreach (noise[k]) begin s1 += noise[k]; s2 += noise[k] * noise[k]; end
    s1 /= noise.size(); s2 = s2 / noise.size() - s1 * s1;
    $display("noise: mean %f, std %f (sigma %f)", s1, $sqrt(s2), sg);
    chk(s1 < 0.02 && s1 > -0.02 && $sqrt(s2) > 0.95 * sg && $sqrt(s2) < 1.05 * sg, "noise statistics");
    // 2. LLRs
    for (int w = 0; w < NW; w++)
      for (int n = 0; n < N; n++) begin
        real y, l;
        int q;
        y = 1.0 + noise[w * N + n];
        l = 4.0 * y / (sg * sg);                 // 2y/sigma^2 in units of 1/2, halved
        l = l / 2.0;
        q = $rtoi(l + ((l >= 0.0) ? 0.5 : -0.5));
        words[w][n] = (q > 31) ? 31 : ((q < -32) ? -32 : q);
      end
    // 3. decode
    fork
      begin : producer
        for (int w = 0; w < NW; w++)
          for (int g = 0; g < G; g++) begin
            @(negedge clk);
            if (w == 2 && g == 1) begin
              dec_in_valid = 0;
              n_stall++;
              repeat (2) @(negedge clk);
            end
            dec_in_valid = 1;
            for (int k = 0; k < SLOTS * P; k++) dec_llr[k] = W'(words[w][g*SLOTS*P+k]);
            while (!dec_in_ready) @(negedge clk);
          end
        @(negedge clk);
        dec_in_valid = 0;
      end
      begin : consumer
        for (int w = 0; w < NW; w++) begin
          int bad, raw, errs;
          ref_m.decode(words[w]);
          @(posedge clk iff dec_out_valid);
          #1;
          bad = 0; raw = 0; errs = 0;
          for (int n = 0; n < N; n++) begin
            if (dec_bits[n] != ref_m.hd[n]) bad++;
            if (words[w][n] < 0) raw++;
            if (dec_bits[n]) errs++;
          end
          $display("codeword %0d: channel errors %0d, decoded errors %0d, mismatches %0d",
                   w, raw, errs, bad);
          chk(bad == 0, "decisions match the model");
          chk(done_q[w] - start_q[w] == ((w == 2) ? 22 : 20), $sformatf("codeword latency %0d", done_q[w] - start_q[w]));
          chk(w == 0 || w == 2 || done_q[w] - done_q[w-1] == 20, $sformatf("spacing %0d", w > 0 ? done_q[w] - done_q[w-1] : 0));
          if (w > 0 && w != 2) begin
            chk(done_q[w] - done_q[w-1] == 20, "back-to-back spacing");
            n_b2b++;
          end
          if (raw > 0 && errs == 0) n_corr++;
        end
      end
    join
    chk(n_stall > 0, "stall happened");
    chk(n_b2b > 0, "back-to-back codewords happened");
    chk(n_open > 0, "RMAS1 feedback opened");
    chk(n_g11 > 0 && n_g12 > 0, "11- and 12-port groups");
    chk(n_corr > 0, "channel errors corrected");
    chk(n_pause > 0, "AWGN pause");
    $display("mechanisms: stall %0d, back-to-back %0d, feedback opened %0d, 11-port %0d, 12-port %0d, corrected words %0d, noise pauses %0d",
             n_stall, n_b2b, n_open, n_g11, n_g12, n_corr, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
