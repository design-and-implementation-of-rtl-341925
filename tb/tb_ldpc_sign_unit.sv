// tb_ldpc_sign_unit - self-checking testbench of ldpc_sign_unit.
//
// Writes random signs group by group (with the 11/12 port masks of a
// block row) and checks before every write that each output sign equals
// the XOR of all stored signs except the port's own, computed from a
// separate array.
module tb_ldpc_sign_unit;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic upd;
  logic [1:0] grp;
  logic [PORTS-1:0] sgn_in, en, sgn_out;
  bit   st [G][PORTS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_sign_unit dut (.clk(clk), .rst_n(rst_n), .upd(upd), .grp(grp),
    .sgn_in(sgn_in), .en(en), .sgn_out(sgn_out));

  initial begin
    upd = 0; grp = 0; sgn_in = '0; en = '0;
    foreach (st[g, k]) st[g][k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int g;
      g = t % G;
      @(negedge clk);
      grp = 2'(g);
      en  = (g % 2) ? 12'hFFF : 12'h7FF;
      upd = 0;
      #1;
      for (int k = 0; k < PORTS; k++) begin
        bit exp;
        exp = 0;
        foreach (st[a, b]) if (!(a == g && b == k)) exp ^= st[a][b];
        if (en[k]) begin
          checks++;
          if (sgn_out[k] !== exp) begin failures++; $display("FAIL t=%0d k=%0d", t, k); end
        end
      end
      sgn_in = PORTS'($urandom);
      upd = 1;
      @(posedge clk);
      for (int k = 0; k < PORTS; k++) st[g][k] = sgn_in[k] & en[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
