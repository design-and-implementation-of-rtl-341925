// ldpc_sign_unit - accumulative sign operation unit of a CNU.
//
// Stores the sign of the latest message from each of the up to 4 x 12 CNU
// inputs and the parity of each group's signs. On an update cycle for group
// grp the signs arriving on the 12 ports replace that group's stored signs
// and a 12-input XOR forms the group parity. The global sign is the 4-input
// XOR of the group parities. The sign sent back on port k of group grp is
// the global sign XOR the stored sign of that same input, i.e. the product
// of the signs of all other inputs of the check node. Ports whose en bit
// is low store 0. The outputs use the registers only, so they are valid in
// the cycle the messages of group grp are needed, before the update.
// Structure after the document; reset to zero is this design's choice.
module ldpc_sign_unit
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd,      // store the signs of group grp
  input  logic [1:0]       grp,
  input  logic [PORTS-1:0] sgn_in,
  input  logic [PORTS-1:0] en,
  output logic [PORTS-1:0] sgn_out   // sign of check-to-variable messages
);

  logic [G-1:0][PORTS-1:0] sgn_q;
  logic [G-1:0]            par_q;
  logic                    gsign;

  assign gsign   = ^par_q;                  // XOR4
  assign sgn_out = sgn_q[grp] ^ {PORTS{gsign}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sgn_q <= '0;
      par_q <= '0;
    end else if (upd) begin
      sgn_q[grp] <= sgn_in & en;
      par_q[grp] <= ^(sgn_in & en);       // XOR12
    end
  end

endmodule
