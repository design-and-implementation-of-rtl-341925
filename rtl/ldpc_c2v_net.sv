// ldpc_c2v_net - check-to-variable interconnect.
//
// Routes each CNU output port to the VNU edge it belongs to in the group
// being processed. For slot s, VNU j and edge e in group g the source is
// block row r = edge_row(s,g,e), check i = (j - shift) mod P of that row,
// port slot_port(r,g,s). The G candidates form a multiplexer selected by
// grp; identical candidates collapse in synthesis. Edges beyond a slot's
// degree read zero. Purely combinational; connectivity from ldpc_pkg.
module ldpc_c2v_net
  import ldpc_pkg::*;
#(
  parameter int P = 32
) (
  input  logic [1:0]                          grp,
  input  sm_t [MB*P-1:0][PORTS-1:0]           ce,
  output sm_t [SLOTS*P-1:0][DVMAX-1:0]        ve
);

  for (genvar s = 0; s < SLOTS; s++) begin : g_s
    for (genvar j = 0; j < P; j++) begin : g_j
      for (genvar e = 0; e < DVMAX; e++) begin : g_e
        sm_t cand [G];
        for (genvar g = 0; g < G; g++) begin : g_g
          localparam int R = edge_row(s, g, e);
          if (R >= 0) begin : g_used
            localparam int I = (j + P - cp_shift(R, g * SLOTS + s, P)) % P;
            localparam int K = slot_port(R, g, s);
            assign cand[g] = ce[R*P+I][K];
          end else begin : g_unused
            assign cand[g] = '0;
          end
        end
        assign ve[s*P+j][e] = cand[grp];
      end
    end
  end

endmodule
