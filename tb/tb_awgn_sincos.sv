// tb_awgn_sincos - self-checking testbench of awgn_sincos.
//
// Streams random angles (and the four quadrant boundaries) and checks
// cos(2 pi u2) and sin(2 pi u2) two cycles later against real arithmetic
// within 0.002 (half a table segment plus Q(16,15) rounding).
module tb_awgn_sincos;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [31:0] u2;
  logic signed [15:0] c, s;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  always #5 clk = ~clk;

  awgn_sincos dut (.clk(clk), .rst_n(rst_n), .en(en), .u2(u2), .cos_o(c), .sin_o(s));

  initial begin
    en = 0; u2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int t = 0; t < 20000; t++) begin
      u2 = (t < 4) ? 32'(t) << 30 : $urandom;
      hist.push_back(u2);
      @(negedge clk);
      if (t >= 1) begin
        real th, ec, es;
        logic [31:0] uo;
        uo = hist.pop_front();
        th = 6.283185307179586 * real'(uo) / 4294967296.0;
        ec = $cos(th) - real'(c) / 32768.0;
        es = $sin(th) - real'(s) / 32768.0;
        checks++;
        if (ec > 0.002 || ec < -0.002 || es > 0.002 || es < -0.002) begin
          failures++;
          if (failures < 10) $display("FAIL u2=%h err %f %f", uo, ec, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
