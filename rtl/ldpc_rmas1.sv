// ldpc_rmas1 - Reduced Memory Accumulative Sorter 1, the magnitude part of
// a CNU.
//
// The plain accumulative sorter keeps min, second min and index for each of
// the four VSS subgroups. This sorter keeps only two such sets:
//   L : local min / second min (with {group,port} indices) of the subgroup
//       updated last, written by the local sorter every update cycle;
//   O : the running global min / second min of the check node.
// In every cycle the global sorter merges L with the feedback from O
// (a 4-to-2 sort) into gm, the global pair used to form the outgoing
// check-to-variable magnitudes of the current group, and O takes gm.
// The feedback of an O entry is opened (forced to the maximum magnitude,
// which loses every comparison) when that entry came from the subgroup now
// held in L, because L holds the newer values of that subgroup. On the first
// initialisation cycle of a codeword both loops are open and gm is empty.
// During initialisation O thus accumulates the exact global pair over the
// G subgroups; during decoding an entry that is opened cannot be replaced
// by a value of another subgroup, so gm can be larger than the exact value,
// the approximation the sorter trades for its smaller storage.
// Stored bits per CNU: 2 x (min + 2nd min + index + 2nd index), as counted
// for this sorter in the document.
//
// Interface: upd/first/grp/mag/en are sampled at the clock edge; gm is
// combinational from the registers (valid in the cycle of group grp,
// before that group's update). Ties go to L, then to the lower port.
// The document's condition list also opens the feedback when the current
// group is the fourth; this design does not, see the design notes.
module ldpc_rmas1
  import ldpc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     upd,
  input  logic                     first,   // first init cycle of a codeword
  input  logic [1:0]               grp,
  input  logic [PORTS-1:0][MW-1:0] mag,
  input  logic [PORTS-1:0]         en,
  output minpair_t                 gm
);

  minpair_t   l_q, o_q, loc, fb;
  logic [1:0] lg_q;
  logic       open1, open2;

  ldpc_local_sorter #(.N(PORTS)) u_local (
    .mag(mag), .en(en), .grp(grp), .res(loc)
  );

  // outer feedback loop gating
  always_comb begin
    open1 = (o_q.i1[IW-1 -: 2] == lg_q);
    open2 = (o_q.i2[IW-1 -: 2] == lg_q);
    fb = MINPAIR_EMPTY;
    if (!open1) begin
      fb.m1 = o_q.m1; fb.i1 = o_q.i1;
      if (!open2) begin fb.m2 = o_q.m2; fb.i2 = o_q.i2; end
    end else if (!open2) begin
      fb.m1 = o_q.m2; fb.i1 = o_q.i2;
    end
  end

  // global 4-to-2 sorter, L wins ties
  always_comb begin
    gm = MINPAIR_EMPTY;
    if (!first) begin
      if (fb.m1 < l_q.m1) begin
        gm.m1 = fb.m1; gm.i1 = fb.i1;
        if (l_q.m1 <= fb.m2) begin gm.m2 = l_q.m1; gm.i2 = l_q.i1; end
        else                 begin gm.m2 = fb.m2;  gm.i2 = fb.i2;  end
      end else begin
        gm.m1 = l_q.m1; gm.i1 = l_q.i1;
        if (fb.m1 < l_q.m2) begin gm.m2 = fb.m1;  gm.i2 = fb.i1;  end
        else                begin gm.m2 = l_q.m2; gm.i2 = l_q.i2; end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q  <= MINPAIR_EMPTY;
      o_q  <= MINPAIR_EMPTY;
      lg_q <= '0;
    end else if (upd) begin
      l_q  <= loc;
      lg_q <= grp;
      o_q  <= gm;
    end
  end

endmodule
