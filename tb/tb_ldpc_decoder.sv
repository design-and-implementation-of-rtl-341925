// tb_ldpc_decoder - self-checking testbench of ldpc_decoder.
//
// Sends codewords of channel LLRs and compares the decoder's 2048 hard
// decisions with the behavioural reference ldpc_ref_pkg. Inputs are the
// all-zero codeword through a BPSK/AWGN channel at several noise levels
// (Gaussian noise from a sum of 12 uniform numbers), plus noiseless words.
// Checks: every output bit against the reference, the cycle count of a
// codeword (4 initialisation + 4 x 4 decoding cycles = 20 from the first
// LLR transfer to out_valid), the back-to-back rate of one codeword per 20
// cycles, correct handling of stalls in the LLR input, and that a noiseless
// word decodes to all zeros. A watchdog ends a hung simulation.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P    = 32;
  localparam int ITER = 4;
  localparam int N    = G * SLOTS * P;
  localparam int NW   = 12;           // codewords

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid;
  logic signed [SLOTS*P-1:0][W-1:0] llr_in;
  logic [N-1:0] out_bits;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ldpc_decoder #(.P(P), .ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .llr_in(llr_in), .out_valid(out_valid), .out_bits(out_bits)
  );

  ldpc_ref #(.P(P), .ITER(ITER)) ref_m;
  int  words [NW][N];
  bit  expv  [NW][N];
  int  start_cyc [NW];
  bit  gen_done = 1'b0;

  function automatic real gauss();
    real a = 0.0;
    for (int k = 0; k < 12; k++) a += real'($urandom_range(0, 65535)) / 65536.0;
    return a - 6.0;
  endfunction

  // LLR in units of 0.5 (1 fractional bit), saturated to 6 bits
  function automatic int quant(real v);
    int q = $rtoi(v * 2.0 + ((v >= 0.0) ? 0.5 : -0.5));
    if (q > 31) q = 31;
    if (q < -32) q = -32;
    return q;
  endfunction

  // producer: sends all words; stalls before words 3 and 7
  initial begin
    in_valid = 1'b0;
    llr_in   = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (gen_done);
    @(posedge clk);
    for (int w = 0; w < NW; w++) begin
      for (int g = 0; g < G; g++) begin
        @(negedge clk);
        if ((w == 3 || w == 7) && g == 2) begin
          in_valid = 1'b0;
          repeat (3) @(negedge clk);
        end
        in_valid = 1'b1;
        for (int k = 0; k < SLOTS * P; k++) llr_in[k] = W'(words[w][g*SLOTS*P+k]);
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
  end

  // cycle stamps of the first LLR transfer and of out_valid
  int start_q [$], done_q [$];
  always @(posedge clk) begin
    if (in_valid && in_ready && dut.first) start_q.push_back(cyc);
    if (rst_n && out_valid) done_q.push_back(cyc);
  end

  // consumer
  initial begin : consumer
    int prev_done;
    ref_m = new();
    for (int w = 0; w < NW; w++) begin
      real sigma;
      sigma = (w < 2) ? 0.0 : 0.30 + 0.01 * real'(w);
      for (int n = 0; n < N; n++) begin
        real y;
        y = 1.0 + sigma * gauss();
        words[w][n] = (sigma == 0.0) ? 8 : quant(2.0 * y / ((sigma < 0.3) ? 1.0 : sigma * sigma) / 4.0);
      end
      ref_m.decode(words[w]);
      for (int n = 0; n < N; n++) expv[w][n] = ref_m.hd[n];
    end
    gen_done = 1'b1;
    prev_done = -1;
    for (int w = 0; w < NW; w++) begin
      int bad, errs, raw;
      @(posedge clk iff out_valid);
      #1;
      start_cyc[w] = done_q[w] - start_q[w];
      bad = 0; errs = 0; raw = 0;
      for (int n = 0; n < N; n++) begin
        if (out_bits[n] != expv[w][n]) bad++;
        if (out_bits[n]) errs++;
        if (words[w][n] < 0) raw++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL word %0d: %0d bits differ from reference", w, bad);
      end
      // latency: first LLR transfer at cycle start, out_valid 20 cycles later
      checks++;
      if (!(w == 3 || w == 7) && start_cyc[w] != G * (ITER + 1)) begin
        failures++;
        $display("FAIL word %0d: latency %0d cycles", w, cyc - 1 - start_cyc[w]);
      end
      if (w == 3 || w == 7) begin
        if (start_cyc[w] != G * (ITER + 1) + 3) begin
          failures++;
          $display("FAIL word %0d: stalled latency %0d cycles", w, cyc - 1 - start_cyc[w]);
        end
      end
      // throughput: one codeword per 20 cycles back to back
      if (prev_done >= 0 && !(w == 3 || w == 7)) begin
        checks++;
        if (done_q[w] - prev_done != G * (ITER + 1)) begin
          failures++;
          $display("FAIL word %0d: spacing %0d cycles", w, done_q[w] - prev_done);
        end
      end
      if (w < 2) begin
        checks++;
        if (errs != 0) begin
          failures++;
          $display("FAIL word %0d: noiseless word not all zero", w);
        end
      end
      $display("word %0d: channel errors %0d, decoded errors %0d", w, raw, errs);
      prev_done = done_q[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NW * 40 + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
