// ldpc_ctrl - VSS schedule controller of the decoder.
//
// A codeword takes G initialisation cycles followed by ITER iterations of
// G decoding cycles (4 + 4 x 4 = 20 cycles at the defaults, as in the
// document's throughput formula). In initialisation cycle g the channel LLRs
// of group g are accepted (in_valid && in_ready) and the CNUs collect their
// first min pairs; the controller waits in place while in_valid is low
// (a stall). Decoding cycles run back to back without a stall. The cycle
// after the last decoding cycle raises out_valid for one cycle; in that
// same cycle initialisation of the next codeword may already begin, so
// codewords follow each other every G*(ITER+1) cycles.
// Outputs load, first, dec, grp and in_ready are combinational from the
// state (load and first also from in_valid); out_valid is a register.
// The in_valid/in_ready handshake is this design's choice.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int ITER = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       load,      // initialisation cycle, LLRs of group grp
  output logic       first,     // first initialisation cycle of a codeword
  output logic       dec,       // decoding cycle of group grp
  output logic [1:0] grp,
  output logic       out_valid
);

  typedef enum logic {S_INIT, S_DEC} state_t;

  localparam int ITW = (ITER > 1) ? $clog2(ITER) : 1;

  state_t         state_q;
  logic [1:0]     grp_q;
  logic [ITW-1:0] it_q;
  logic           done_q;

  assign in_ready  = (state_q == S_INIT);
  assign load      = in_ready && in_valid;
  assign first     = load && (grp_q == 2'd0);
  assign dec       = (state_q == S_DEC);
  assign grp       = grp_q;
  assign out_valid = done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      grp_q   <= '0;
      it_q    <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (load) begin
        grp_q <= grp_q + 2'd1;
        if (grp_q == 2'(G - 1)) begin
          state_q <= S_DEC;
          it_q    <= '0;
        end
      end else if (dec) begin
        grp_q <= grp_q + 2'd1;
        if (grp_q == 2'(G - 1)) begin
          if (it_q == ITW'(ITER - 1)) begin
            state_q <= S_INIT;
            done_q  <= 1'b1;
          end else begin
            it_q <= it_q + 1'b1;
          end
        end
      end
    end
  end

  // a codeword's LLRs are accepted only while initialising
  a_no_load_in_dec: assert property (@(posedge clk) disable iff (!rst_n)
    !(load && dec));

endmodule
