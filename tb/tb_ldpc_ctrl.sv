// tb_ldpc_ctrl - self-checking testbench of ldpc_ctrl (ITER = 4 and 2).
//
// Offers codewords with random gaps in in_valid and checks the schedule
// cycle by cycle against a counter model: G accepted initialisation
// cycles (first on the first), then ITER*G decoding cycles with grp
// counting 0..G-1, in_ready low while decoding, and a single out_valid
// pulse in the cycle after the last decoding cycle.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic rdy4, load4, first4, dec4, ov4;
  logic [1:0] grp4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_ctrl #(.ITER(4)) u4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_ready(rdy4), .load(load4), .first(first4), .dec(dec4), .grp(grp4), .out_valid(ov4));

  // model
  int m_init = 0;      // accepted init cycles of the current codeword
  int m_dec  = -1;     // decoding cycle index, -1 when initialising
  bit m_ov   = 0;
  int words  = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      #1;
      chk(ov4 == m_ov, "out_valid");
      if (m_dec < 0) begin
        chk(rdy4 && !dec4, "init state");
        chk(load4 == in_valid, "load");
        chk(first4 == (in_valid && m_init == 0), "first");
        chk(grp4 == 2'(m_init), "init grp");
      end else begin
        chk(!rdy4 && dec4 && !load4, "dec state");
        chk(grp4 == 2'(m_dec % G), "dec grp");
      end
      @(posedge clk);
      m_ov = 0;
      if (m_dec < 0) begin
        if (in_valid) begin
          m_init++;
          if (m_init == G) begin m_init = 0; m_dec = 0; end
        end
      end else begin
        m_dec++;
        if (m_dec == 4 * G) begin m_dec = -1; m_ov = 1; words++; end
      end
    end
    chk(words > 10, "codewords completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
