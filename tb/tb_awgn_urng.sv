// tb_awgn_urng - self-checking testbench of awgn_urng.
//
// Loads a seed, steps the generator with random gaps in en and compares
// every output with the behavioural model; also checks that the mean of
// the outputs is close to 1/2. The second pass reloads the seed mid-stream
// and checks that the sequence restarts from it.
module tb_awgn_urng;
  logic clk = 1'b0, rst_n = 1'b0;
  logic seed_load, en;
  logic [127:0] seed;
  logic [31:0] u;
  int checks = 0, failures = 0;
  bit [31:0] z [4];

  `include "tb/taus113_model.svh"

  always #5 clk = ~clk;

  awgn_urng dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed), .en(en), .u(u));

  initial begin
    real mean;
    seed_load = 0; en = 0; seed = {32'd987654321, 32'd55555, 32'd4242, 32'd31337};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      mean = 0.0;
      @(negedge clk); seed_load = 1; en = 0;
      @(negedge clk); seed_load = 0;
      taus_seed(z, seed);
      for (int t = 0; t < 20000; t++) begin
        en = ($urandom_range(0, 4) != 0);
        #1;
        checks++;
        if (u !== taus_out(z)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, u, taus_out(z));
        end
        mean += real'(u) / 4294967296.0;
        @(negedge clk);
        if (en) taus_step(z);
      end
      mean /= 20000.0;
      checks++;
      if (mean < 0.49 || mean > 0.51) begin failures++; $display("FAIL mean %f", mean); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
