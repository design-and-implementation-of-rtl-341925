// ldpc_v2c_net - variable-to-check interconnect.
//
// Routes the outgoing message of every VNU edge to the CNU port that the
// parity-check matrix assigns to it in the group being processed. For CNU
// row m = r*P + i, port k and group g the source is slot s = port_slot(r,g,k),
// VNU j = (i + shift) mod P of that slot, edge row_edge(s,g,r). The four
// per-group sources of a port form a G-input multiplexer selected by grp;
// where the slot layout and shifts agree across groups the inputs are
// identical and synthesis removes the multiplexer (the document's
// multiplexer reduction by aligning equal blocks). Unused ports read zero.
// Purely combinational. Connectivity is computed from ldpc_pkg.
module ldpc_v2c_net
  import ldpc_pkg::*;
#(
  parameter int P = 32
) (
  input  logic [1:0]                          grp,
  input  sm_t [SLOTS*P-1:0][DVMAX-1:0]        vz,
  output sm_t [MB*P-1:0][PORTS-1:0]           cz
);

  for (genvar r = 0; r < MB; r++) begin : g_r
    for (genvar i = 0; i < P; i++) begin : g_i
      for (genvar k = 0; k < PORTS; k++) begin : g_k
        sm_t cand [G];
        for (genvar g = 0; g < G; g++) begin : g_g
          localparam int S = port_slot(r, g, k);
          if (S >= 0) begin : g_used
            localparam int J = (i + cp_shift(r, g * SLOTS + S, P)) % P;
            localparam int E = row_edge(S, g, r);
            assign cand[g] = vz[S*P+J][E];
          end else begin : g_unused
            assign cand[g] = '0;
          end
        end
        assign cz[r*P+i][k] = cand[grp];
      end
    end
  end

endmodule
