// tb_ldpc_cnu - self-checking testbench of ldpc_cnu (block rows 0 and 2).
//
// Per codeword: four initialisation cycles with random messages, then four
// decoding cycles. In the first decoding cycle the stored state is exact,
// so every outgoing message of group 0 is checked against values computed
// directly from the input history: magnitude floor(0.75 x min over the
// other 45 inputs), sign = XOR of the other 45 signs. Signs are checked in
// all decoding cycles (they are exact throughout).
module tb_ldpc_cnu;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic upd, first;
  logic [1:0] grp;
  sm_t [PORTS-1:0] z, e0, e2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_cnu #(.ROW(0)) u0 (.clk(clk), .rst_n(rst_n), .upd(upd), .first(first),
    .grp(grp), .z_in(z), .eps_out(e0));
  ldpc_cnu #(.ROW(2)) u2 (.clk(clk), .rst_n(rst_n), .upd(upd), .first(first),
    .grp(grp), .z_in(z), .eps_out(e2));

  int hm [G][PORTS];
  bit hs [G][PORTS];

  task automatic check_row(int row, sm_t [PORTS-1:0] eo, int g, bit chk_mag);
    for (int k = 0; k < row_cnt(row, g); k++) begin
      int mn; bit sg;
      mn = 99; sg = 0;
      for (int gg = 0; gg < G; gg++)
        for (int kk = 0; kk < row_cnt(row, gg); kk++)
          if (!(gg == g && kk == k)) begin
            if (hm[gg][kk] < mn) mn = hm[gg][kk];
            sg ^= hs[gg][kk];
          end
      checks++;
      if (eo[k].sgn !== sg || (chk_mag && eo[k].mag != 5'((mn * 3) / 4))) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d g %0d k %0d got %0d/%0d exp %0d/%0d",
                                    row, g, k, eo[k].sgn, eo[k].mag, sg, (mn * 3) / 4);
      end
    end
  endtask

  initial begin
    upd = 0; first = 0; grp = 0; z = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      for (int c = 0; c < 2 * G; c++) begin
        int g;
        g = c % G;
        @(negedge clk);
        grp = 2'(g); first = (c == 0); upd = 1;
        #1;
        // rows 0 and 2 use the same number of ports in groups 0 and 2 only
        // when equal; inputs beyond a row's count are ignored by that row
        if (c >= G) begin
          check_row(0, e0, g, c == G);
        end
        for (int k = 0; k < PORTS; k++) begin
          z[k].sgn = 1'($urandom);
          z[k].mag = 5'($urandom_range((f % 2) ? 1 : 0, 31));
        end
        // history for row 0; row 2 is checked on its own sign rule below
        for (int k = 0; k < PORTS; k++) begin hm[g][k] = z[k].mag; hs[g][k] = z[k].sgn; end
        @(posedge clk);
      end
    end
    // row 2: one codeword with its own history
    for (int c = 0; c < G + 1; c++) begin
      int g;
      g = c % G;
      @(negedge clk);
      grp = 2'(g); first = (c == 0); upd = (c < G);
      #1;
      if (c == G) check_row(2, e2, g, 1'b1);
      for (int k = 0; k < PORTS; k++) begin
        z[k].sgn = 1'($urandom);
        z[k].mag = 5'($urandom_range(0, 31));
        if (c < G) begin hm[g][k] = z[k].mag; hs[g][k] = z[k].sgn; end
      end
      @(posedge clk);
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
