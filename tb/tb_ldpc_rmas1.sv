// tb_ldpc_rmas1 - self-checking testbench of ldpc_rmas1.
//
// Drives codewords of 4 initialisation and 8 decoding cycles with random
// magnitudes (block row 0 port masks) and checks, before every update,
// the global pair against a model that keeps the two stored sets and
// merges them by sequential insertion (L entries first, O entries of L's
// group dropped). At the first decoding cycle of each codeword it also
// checks min and second min against the exact values over all 46 inputs,
// computed directly from the stored input history.
module tb_ldpc_rmas1;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic upd, first;
  logic [1:0] grp;
  logic [PORTS-1:0][MW-1:0] mag;
  logic [PORTS-1:0] en;
  minpair_t gm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_rmas1 dut (.clk(clk), .rst_n(rst_n), .upd(upd), .first(first),
    .grp(grp), .mag(mag), .en(en), .gm(gm));

  int lm1, li1, lm2, li2, lg;
  int om1, oi1, om2, oi2;
  int hist [G][PORTS];

  function automatic void ins(int v, int idx, ref int m1, ref int i1, ref int m2, ref int i2);
    if (v < m1) begin m2 = m1; i2 = i1; m1 = v; i1 = idx; end
    else if (v < m2) begin m2 = v; i2 = idx; end
  endfunction

  initial begin
    upd = 0; first = 0; grp = 0; mag = '0; en = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      for (int c = 0; c < 3 * G; c++) begin
        int g, em1, ei1, em2, ei2, a1, b1, a2, b2;
        bit fst;
        g = c % G;
        fst = (c == 0);
        @(negedge clk);
        grp = 2'(g); first = fst; upd = 1;
        for (int k = 0; k < PORTS; k++) begin
          en[k]  = (k < row_cnt(0, g));
          mag[k] = 5'($urandom_range((f % 2) ? 0 : 5, (f % 3 == 0) ? 8 : 30));
        end
        #1;
        // model of the global pair
        em1 = 31; ei1 = 63; em2 = 31; ei2 = 63;
        if (!fst) begin
          ins(lm1, li1, em1, ei1, em2, ei2);
          ins(lm2, li2, em1, ei1, em2, ei2);
          if ((oi1 >> 4) != lg) ins(om1, oi1, em1, ei1, em2, ei2);
          if ((oi2 >> 4) != lg) ins(om2, oi2, em1, ei1, em2, ei2);
        end
        checks++;
        if (gm.m1 != 5'(em1) || gm.m2 != 5'(em2) || (em1 < 31 && gm.i1 != 6'(ei1))) begin
          failures++;
          if (failures < 10) $display("FAIL f=%0d c=%0d got %0d/%0d %0d exp %0d/%0d %0d",
                                      f, c, gm.m1, gm.i1, gm.m2, em1, ei1, em2);
        end
        if (c == G) begin  // first decoding cycle: exact global pair
          int x1, x2, y1, y2;
          x1 = 99; y1 = 0; x2 = 99; y2 = 0;
          for (int gg = 0; gg < G; gg++)
            for (int k = 0; k < row_cnt(0, gg); k++) ins(hist[gg][k], 0, x1, y1, x2, y2);
          checks++;
          if (gm.m1 != 5'(x1) || gm.m2 != 5'(x2)) begin
            failures++;
            $display("FAIL f=%0d exact pair got %0d %0d exp %0d %0d", f, gm.m1, gm.m2, x1, x2);
          end
        end
        // model update
        om1 = em1; oi1 = ei1; om2 = em2; oi2 = ei2;
        a1 = 31; b1 = 63; a2 = 31; b2 = 63;
        for (int k = 0; k < PORTS; k++)
          if (en[k]) begin
            ins(int'(mag[k]), g * 16 + k, a1, b1, a2, b2);
            hist[g][k] = mag[k];
          end
        lm1 = a1; li1 = b1; lm2 = a2; li2 = b2; lg = g;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
