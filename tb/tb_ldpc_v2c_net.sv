// tb_ldpc_v2c_net - self-checking testbench of ldpc_v2c_net (P = 4 and 32).
//
// Fills every VNU edge output with random messages and, for every group,
// checks each CNU port against the message expected from the parity-check
// structure: the k-th non-zero block of a block row (in slot order) in that
// group, variable (i + shift) mod P, at the edge given by the block row's
// rank among the slot's rows. Unused ports must read zero.
module tb_ldpc_v2c_net;
  import ldpc_pkg::*;

  int checks = 0, failures = 0;

  localparam int PA = 4;
  localparam int PB = 32;

  logic [1:0] grp;
  sm_t [SLOTS*PA-1:0][DVMAX-1:0] vza;
  sm_t [MB*PA-1:0][PORTS-1:0]    cza;
  sm_t [SLOTS*PB-1:0][DVMAX-1:0] vzb;
  sm_t [MB*PB-1:0][PORTS-1:0]    czb;

  ldpc_v2c_net #(.P(PA)) ua (.grp(grp), .vz(vza), .cz(cza));
  ldpc_v2c_net #(.P(PB)) ub (.grp(grp), .vz(vzb), .cz(czb));

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int n = 0; n < SLOTS * PA; n++) for (int e = 0; e < DVMAX; e++) vza[n][e] = 6'($urandom);
      for (int n = 0; n < SLOTS * PB; n++) for (int e = 0; e < DVMAX; e++) vzb[n][e] = 6'($urandom);
      for (int g = 0; g < G; g++) begin
        grp = 2'(g);
        #1;
        for (int r = 0; r < MB; r++) begin
          int k;
          k = 0;
          for (int s = 0; s < SLOTS; s++)
            if (has_row(s, g, r)) begin
              int e;
              e = 0;
              for (int rr = 0; rr < r; rr++) if (has_row(s, g, rr)) e++;
              for (int i = 0; i < PA; i++) begin
                checks++;
                if (cza[r*PA+i][k] !== vza[s*PA + (i + SHIFT32[r][g*SLOTS+s]) % PA][e]) begin
                  failures++;
                  if (failures < 10) $display("FAIL P4 g%0d r%0d i%0d k%0d", g, r, i, k);
                end
              end
              for (int i = 0; i < PB; i++) begin
                checks++;
                if (czb[r*PB+i][k] !== vzb[s*PB + (i + SHIFT32[r][g*SLOTS+s]) % PB][e]) begin
                  failures++;
                  if (failures < 10) $display("FAIL P32 g%0d r%0d i%0d k%0d", g, r, i, k);
                end
              end
              k++;
            end
          for (; k < PORTS; k++)
            for (int i = 0; i < PA; i++) begin
              checks++;
              if (cza[r*PA+i][k] !== '0) begin failures++; $display("FAIL unused port"); end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
