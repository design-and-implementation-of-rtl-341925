// tb_ldpc_local_sorter - self-checking testbench of ldpc_local_sorter.
//
// Random magnitudes (0..30) and enable masks, including many equal values,
// against a reference that inserts the enabled inputs in port order into a
// min / second-min pair, keeping the earlier port on ties.
module tb_ldpc_local_sorter;
  import ldpc_pkg::*;

  logic [PORTS-1:0][MW-1:0] mag;
  logic [PORTS-1:0]         en;
  logic [1:0]               grp;
  minpair_t                 res;
  int checks = 0, failures = 0;

  ldpc_local_sorter #(.N(PORTS)) dut (.mag(mag), .en(en), .grp(grp), .res(res));

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int m1, i1, m2, i2;
      int range_hi;
      range_hi = (t % 3 == 0) ? 3 : 30;
      grp = 2'($urandom);
      for (int k = 0; k < PORTS; k++) mag[k] = 5'($urandom_range(0, range_hi));
      en = (t % 2) ? '1 : PORTS'($urandom);
      if (t % 4 == 1) en = 12'h7FF;
      #1;
      m1 = 32; i1 = 63; m2 = 32; i2 = 63;
      for (int k = 0; k < PORTS; k++)
        if (en[k]) begin
          if (mag[k] < m1) begin m2 = m1; i2 = i1; m1 = mag[k]; i1 = grp * 16 + k; end
          else if (mag[k] < m2) begin m2 = mag[k]; i2 = grp * 16 + k; end
        end
      if (m1 == 32) m1 = 31;
      if (m2 == 32) m2 = 31;
      checks++;
      if (res.m1 != 5'(m1) || res.m2 != 5'(m2) || res.i1 != 6'(i1) || res.i2 != 6'(i2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d got %0d/%0d %0d/%0d exp %0d/%0d %0d/%0d", t,
                   res.m1, res.i1, res.m2, res.i2, m1, i1, m2, i2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
