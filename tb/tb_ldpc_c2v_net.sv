// tb_ldpc_c2v_net - self-checking testbench of ldpc_c2v_net (P = 4 and 32).
//
// Fills every CNU port with random messages and, for every group, checks
// each VNU edge against the message expected from the parity-check
// structure: edge e of slot s is its e-th block row r, check row
// (j - shift) mod P, at the port given by the slot's rank among the
// block row's non-zero blocks in that group. Unused edges read zero.
module tb_ldpc_c2v_net;
  import ldpc_pkg::*;

  int checks = 0, failures = 0;

  localparam int PA = 4;
  localparam int PB = 32;

  logic [1:0] grp;
  sm_t [MB*PA-1:0][PORTS-1:0]    cea;
  sm_t [SLOTS*PA-1:0][DVMAX-1:0] vea;
  sm_t [MB*PB-1:0][PORTS-1:0]    ceb;
  sm_t [SLOTS*PB-1:0][DVMAX-1:0] veb;

  ldpc_c2v_net #(.P(PA)) ua (.grp(grp), .ce(cea), .ve(vea));
  ldpc_c2v_net #(.P(PB)) ub (.grp(grp), .ce(ceb), .ve(veb));

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int m = 0; m < MB * PA; m++) for (int k = 0; k < PORTS; k++) cea[m][k] = 6'($urandom);
      for (int m = 0; m < MB * PB; m++) for (int k = 0; k < PORTS; k++) ceb[m][k] = 6'($urandom);
      for (int g = 0; g < G; g++) begin
        grp = 2'(g);
        #1;
        for (int s = 0; s < SLOTS; s++) begin
          int e;
          e = 0;
          for (int r = 0; r < MB; r++)
            if (has_row(s, g, r)) begin
              int k, sh;
              k = 0;
              for (int ss = 0; ss < s; ss++) if (has_row(ss, g, r)) k++;
              sh = SHIFT32[r][g*SLOTS+s];
              for (int j = 0; j < PA; j++) begin
                checks++;
                if (vea[s*PA+j][e] !== cea[r*PA + (j + PA - sh % PA) % PA][k]) begin
                  failures++;
                  if (failures < 10) $display("FAIL P4 g%0d s%0d j%0d e%0d", g, s, j, e);
                end
              end
              for (int j = 0; j < PB; j++) begin
                checks++;
                if (veb[s*PB+j][e] !== ceb[r*PB + (j + PB - sh % PB) % PB][k]) begin
                  failures++;
                  if (failures < 10) $display("FAIL P32 g%0d s%0d j%0d e%0d", g, s, j, e);
                end
              end
              e++;
            end
          for (; e < DVMAX; e++)
            for (int j = 0; j < PA; j++) begin
              checks++;
              if (vea[s*PA+j][e] !== '0) begin failures++; $display("FAIL unused edge"); end
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
