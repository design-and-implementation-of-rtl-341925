// tb_ldpc_vnu - self-checking testbench of ldpc_vnu (DV = 4 and DV = 2).
//
// For each instance: four load cycles with random LLRs (outgoing messages
// must equal the saturated LLR), then decoding cycles with random incoming
// messages. Checks each outgoing message against P + sum - own message
// (saturated sign-magnitude), that decoding cycle g uses the LLR loaded in
// init cycle g (channel register rotation), and that hd holds the sign of
// the a-posteriori sums of groups 0..3 after four decoding cycles.
module tb_ldpc_vnu;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, dec;
  logic signed [W-1:0] llr4, llr2;
  sm_t [3:0] eps4, z4;
  sm_t [1:0] eps2, z2;
  logic [G-1:0] hd4, hd2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_vnu #(.DV(4)) u4 (.clk(clk), .rst_n(rst_n), .load(load), .dec(dec),
    .llr_in(llr4), .eps_in(eps4), .z_out(z4), .hd(hd4));
  ldpc_vnu #(.DV(2)) u2 (.clk(clk), .rst_n(rst_n), .load(load), .dec(dec),
    .llr_in(llr2), .eps_in(eps2), .z_out(z2), .hd(hd2));

  function automatic int smv(sm_t v);
    return v.sgn ? -int'(v.mag) : int'(v.mag);
  endfunction

  function automatic sm_t expsm(int v);
    sm_t o;
    o.sgn = (v < 0);
    o.mag = 5'((v < 0 ? -v : v) > 31 ? 31 : (v < 0 ? -v : v));
    return o;
  endfunction

  task automatic check(string what, sm_t got, sm_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d/%0d exp %0d/%0d", what, got.sgn, got.mag, exp.sgn, exp.mag);
    end
  endtask

  int p4 [G], p2 [G];
  bit h4 [G], h2 [G];

  initial begin
    load = 0; dec = 0; llr4 = '0; llr2 = '0; eps4 = '0; eps2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 50; frame++) begin
      for (int g = 0; g < G; g++) begin
        @(negedge clk);
        load = 1; dec = 0;
        p4[g] = $urandom_range(0, 63) - 32; p2[g] = $urandom_range(0, 63) - 32;
        llr4 = W'(p4[g]); llr2 = W'(p2[g]);
        eps4 = W*4'($urandom); eps2 = W*2'($urandom);
        #1;
        for (int e = 0; e < 4; e++) check("init z4", z4[e], expsm(p4[g]));
        for (int e = 0; e < 2; e++) check("init z2", z2[e], expsm(p2[g]));
      end
      for (int it = 0; it < 2; it++)
        for (int g = 0; g < G; g++) begin
          int s4, s2;
          @(negedge clk);
          load = 0; dec = 1;
          llr4 = W'($urandom); llr2 = W'($urandom);   // ignored while decoding
          for (int e = 0; e < 4; e++) begin eps4[e].sgn = 1'($urandom); eps4[e].mag = 5'($urandom_range(0, 23)); end
          for (int e = 0; e < 2; e++) begin eps2[e].sgn = 1'($urandom); eps2[e].mag = 5'($urandom_range(0, 23)); end
          #1;
          s4 = p4[g]; s2 = p2[g];
          for (int e = 0; e < 4; e++) s4 += smv(eps4[e]);
          for (int e = 0; e < 2; e++) s2 += smv(eps2[e]);
          h4[g] = s4 < 0; h2[g] = s2 < 0;
          for (int e = 0; e < 4; e++) check("dec z4", z4[e], expsm(s4 - smv(eps4[e])));
          for (int e = 0; e < 2; e++) check("dec z2", z2[e], expsm(s2 - smv(eps2[e])));
        end
      @(negedge clk);
      load = 0; dec = 0;
      for (int g = 0; g < G; g++) begin
        checks += 2;
        if (hd4[g] !== h4[g]) begin failures++; $display("FAIL hd4[%0d]", g); end
        if (hd2[g] !== h2[g]) begin failures++; $display("FAIL hd2[%0d]", g); end
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
