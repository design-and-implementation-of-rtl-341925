// tb_awgn_core - self-checking testbench of awgn_core.
//
// Loads seeds and sigma = 1.0, runs with random gaps in en and predicts
// each output pair from the generator model: X = sqrt(-2 ln u1) cos(2 pi u2)
// * sigma and Y likewise with sin, checked within 0.02. Also checks that
// the first valid pair appears at the fifth enabled clock edge, that
// out_valid follows en, and that mean and variance of 40000 samples are
// those of N(0,1). A second run with sigma = 0.5 checks the scaling.
module tb_awgn_core;
  logic clk = 1'b0, rst_n = 1'b0;
  logic seed_load, en, out_valid;
  logic [127:0] s1, s2;
  logic [15:0] sigma;
  logic signed [15:0] nx, ny;
  int checks = 0, failures = 0;
  bit [31:0] z1 [4], z2 [4];

  `include "tb/taus113_model.svh"

  always #5 clk = ~clk;

  awgn_core dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed_u1(s1),
    .seed_u2(s2), .sigma(sigma), .en(en), .out_valid(out_valid),
    .noise_x(nx), .noise_y(ny));

  initial begin
    for (int run = 0; run < 2; run++) begin
      real sg, sum, sum2, ex [$], ey [$];
      int nsamp, edges;
      sg = (run == 0) ? 1.0 : 0.5;
      seed_load = 0; en = 0;
      s1 = {32'd1234567, 32'd7654321, 32'd192837, 32'd918273 + 32'(run)};
      s2 = {32'd5550123, 32'd31415926, 32'd2718281, 32'd1618033};
      sigma = 16'($rtoi(sg * 4096.0));
      repeat (2) @(negedge clk);
      rst_n = 1;
      seed_load = 1;
      @(negedge clk);
      seed_load = 0;
      taus_seed(z1, s1); taus_seed(z2, s2);
      sum = 0.0; sum2 = 0.0; nsamp = 0; edges = 0;
      ex.delete(); ey.delete();
      for (int t = 0; t < 45000; t++) begin
        en = ($urandom_range(0, 5) != 0);
        if (en) begin
          real u1, u2, r;
          bit [31:0] a;
          a  = taus_out(z1);
          u1 = (a == 0) ? 1.0 / 4294967296.0 : real'(a) / 4294967296.0;
          u2 = real'(taus_out(z2)) / 4294967296.0;
          r  = $sqrt(-2.0 * $ln(u1));
          ex.push_back(r * $cos(6.283185307179586 * u2) * sg);
          ey.push_back(r * $sin(6.283185307179586 * u2) * sg);
          taus_step(z1); taus_step(z2);
        end
        @(negedge clk);
        if (en) edges++;
        checks++;
        if (out_valid !== (en && edges >= 5)) begin
          failures++;
          if (failures < 10) $display("FAIL out_valid at edge %0d", edges);
        end
        if (out_valid) begin
          real gx, gy, ax, ay;
          gx = real'(nx) / 4096.0; gy = real'(ny) / 4096.0;
          ax = ex.pop_front(); ay = ey.pop_front();
          checks++;
          if ((gx - ax) > 0.02 || (ax - gx) > 0.02 || (gy - ay) > 0.02 || (ay - gy) > 0.02) begin
            failures++;
            if (failures < 10) $display("FAIL sample %0d got %f %f exp %f %f", nsamp, gx, gy, ax, ay);
          end
          sum += gx + gy; sum2 += gx * gx + gy * gy; nsamp += 2;
        end
      end
      begin
        real m, v;
        m = sum / nsamp; v = sum2 / nsamp - m * m;
        $display("sigma %f: mean %f variance %f over %0d samples", sg, m, v, nsamp);
        checks++;
        if (m > 0.02 * sg || m < -0.02 * sg || v < 0.96 * sg * sg || v > 1.04 * sg * sg) begin
          failures++;
          $display("FAIL statistics");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
