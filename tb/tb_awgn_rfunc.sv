// tb_awgn_rfunc - self-checking testbench of awgn_rfunc.
//
// Streams inputs spread over all logarithmic segments of both halves of
// (0,1), including the extremes 0, 1, 2^31 and 2^32-1, and checks each
// output, three cycles later, against sqrt(-2 ln u1) computed in real
// arithmetic. The tolerance (0.003) covers the linear approximation and the
// Q(16,12) rounding; the largest error seen is printed.
module tb_awgn_rfunc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [31:0] x;
  logic [15:0] r;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  always #5 clk = ~clk;

  awgn_rfunc dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .r(r));

  function automatic logic [31:0] pick(int t);
    case (t % 7)
      0: return 32'd0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      default: begin
        int sh;
        sh = $urandom_range(0, 31);
        if (t % 2) return $urandom >> sh;                    // towards 0
        else       return 32'hFFFF_FFFF - ($urandom >> sh);  // towards 1
      end
    endcase
  endfunction

  initial begin
    real maxerr;
    maxerr = 0.0;
    en = 0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int t = 0; t < 20000; t++) begin
      x = (t < 16) ? pick(t % 3) : pick(t);
      hist.push_back(x);
      @(negedge clk);
      if (t >= 2) begin
        real u1, exp, got, err;
        logic [31:0] xo;
        xo  = hist.pop_front();
        u1  = (xo == 0) ? 1.0 / 4294967296.0 : real'(xo) / 4294967296.0;
        exp = $sqrt(-2.0 * $ln(u1));
        got = real'(r) / 4096.0;
        err = (got > exp) ? got - exp : exp - got;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 0.003) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h got %f exp %f", xo, got, exp);
        end
      end
    end
    $display("max |error| = %f", maxerr);
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
