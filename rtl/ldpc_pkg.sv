// ldpc_pkg - constants, message types and parity-check structure of the
// rate-15/16 (2048,1920) quasi-cyclic LDPC decoder.
//
// The parity-check matrix H is a 4 x 64 array of p x p circulant
// permutation (CP) blocks or all-zero blocks, p = 32. Each block row (one
// group of 32 check nodes) has 46 non-zero blocks; 16 block columns have
// degree 4, 24 have degree 3 and 24 have degree 2. For variable-node-centric
// sequential scheduling the 64 block columns are split into G = 4 groups of
// 16 "slots". Every group has the same slot layout: slots 0..3 are degree 4,
// slots 4..9 degree 3 and slots 10..15 degree 2, so one set of 16*p VNUs
// serves all groups. These counts follow the code description.
//
// This design's own choices (the structure functions below):
//  * which block rows a degree-3 or degree-2 slot touches. Degree-2 slots
//    use the six row pairs, the same in every group; a degree-3 slot s of
//    group g leaves out block row ((s-4) + 2g) mod 4. That gives each block
//    row 11 or 12 edges per group and 46 in total.
//  * the circulant shift of each non-zero block, table SHIFT32 read
//    through cp_shift(). Replace the table to decode another code with
//    the same layout.
//
// Variable nodes are numbered in the permuted order n = (g*16+s)*p + j,
// check nodes m = r*p + i. A CP block with shift k connects check row i of
// its block row to variable j = (i + k) mod p of its block column.
package ldpc_pkg;

  localparam int G      = 4;    // VSS groups per codeword
  localparam int MB     = 4;    // block rows
  localparam int SLOTS  = 16;   // block columns per group
  localparam int DVMAX  = 4;    // largest variable node degree
  localparam int PORTS  = 12;   // CNU inputs handled per group (11 or 12 used)
  localparam int W      = 6;    // message width, two's complement
  localparam int MW     = W - 1; // magnitude width in sign-magnitude form
  localparam int IW     = 6;    // CNU input index width: {group, port}
  localparam logic [MW-1:0] MAG_MAX = '1;
  localparam logic [IW-1:0] IDX_NONE = '1;  // index of an emptied entry

  // Message in sign-magnitude form, as exchanged between VNUs and CNUs.
  typedef struct packed {
    logic          sgn;   // 1 = negative
    logic [MW-1:0] mag;
  } sm_t;

  // Min / second min pair with the {group, port} index of each.
  typedef struct packed {
    logic [MW-1:0] m1;
    logic [IW-1:0] i1;
    logic [MW-1:0] m2;
    logic [IW-1:0] i2;
  } minpair_t;

  localparam minpair_t MINPAIR_EMPTY = '{m1: MAG_MAX, i1: IDX_NONE,
                                         m2: MAG_MAX, i2: IDX_NONE};

  // Degree of slot s.
  function automatic int slot_deg(int s);
    if (s < 4)       return 4;
    else if (s < 10) return 3;
    else             return 2;
  endfunction

  // 1 when slot s of group g has a non-zero block in block row r.
  function automatic bit has_row(int s, int g, int r);
    int a, b;
    if (s < 4) return 1'b1;
    if (s < 10) return r != (((s - 4) + 2 * g) % MB);
    // degree 2: pairs (0,1) (2,3) (0,2) (1,3) (0,3) (1,2)
    case (s - 10)
      0: begin a = 0; b = 1; end
      1: begin a = 2; b = 3; end
      2: begin a = 0; b = 2; end
      3: begin a = 1; b = 3; end
      4: begin a = 0; b = 3; end
      default: begin a = 1; b = 2; end
    endcase
    return (r == a) || (r == b);
  endfunction

  // Circulant shifts of the 4 x 64 non-zero block positions for p = 32
  // (entries of all-zero blocks are ignored). Chosen by a search so that few
  // pairs of block columns close a length-4 cycle; for a smaller p the
  // shifts are taken mod p.
  localparam int SHIFT32 [MB][G*SLOTS] = '{
    '{24, 5, 20, 18, 31, 2, 28, 27, 13, 10, 14, 1, 3, 27, 30, 28, 5, 17, 16, 25, 3, 22, 1, 0, 6, 20, 18, 1, 6, 28, 20, 14, 10, 3, 28, 9, 18, 16, 4, 5, 11, 5, 28, 21, 9, 12, 30, 18, 9, 5, 2, 12, 10, 17, 26, 31, 23, 31, 17, 28, 29, 10, 22, 23},
    '{6, 13, 1, 18, 9, 25, 10, 4, 4, 0, 18, 14, 25, 14, 22, 25, 30, 18, 19, 4, 2, 21, 15, 30, 2, 1, 10, 31, 22, 14, 22, 25, 17, 29, 1, 28, 27, 11, 11, 22, 19, 4, 14, 1, 28, 11, 17, 27, 31, 3, 12, 17, 16, 2, 4, 10, 14, 28, 0, 18, 29, 20, 31, 10},
    '{0, 29, 3, 3, 27, 6, 12, 23, 29, 3, 13, 16, 30, 14, 1, 17, 8, 24, 30, 13, 27, 12, 20, 6, 1, 0, 20, 4, 27, 19, 8, 22, 15, 29, 6, 9, 10, 1, 10, 2, 14, 14, 0, 6, 11, 29, 10, 16, 0, 10, 20, 31, 13, 1, 7, 29, 6, 0, 18, 17, 15, 20, 25, 0},
    '{24, 13, 21, 11, 20, 25, 20, 13, 11, 9, 24, 26, 31, 12, 11, 2, 7, 15, 13, 7, 30, 17, 10, 3, 21, 21, 21, 17, 18, 4, 8, 8, 22, 25, 15, 13, 31, 26, 10, 8, 2, 1, 24, 9, 14, 2, 24, 23, 5, 16, 31, 29, 15, 2, 5, 30, 30, 5, 26, 12, 2, 12, 6, 26}
  };

  // Circulant shift of block (block row r, block column c), c = g*16+s.
  function automatic int cp_shift(int r, int c, int p);
    return SHIFT32[r][c] % p;
  endfunction

  // Number of CNU ports used by block row r in group g (11 or 12).
  function automatic int row_cnt(int r, int g);
    int n = 0;
    for (int s = 0; s < SLOTS; s++) if (has_row(s, g, r)) n++;
    return n;
  endfunction

  // Slot feeding CNU port k of block row r in group g, -1 if unused.
  function automatic int port_slot(int r, int g, int k);
    int n = 0;
    for (int s = 0; s < SLOTS; s++)
      if (has_row(s, g, r)) begin
        if (n == k) return s;
        n++;
      end
    return -1;
  endfunction

  // CNU port that slot s occupies in block row r during group g.
  function automatic int slot_port(int r, int g, int s);
    int n = 0;
    for (int t = 0; t < s; t++) if (has_row(t, g, r)) n++;
    return n;
  endfunction

  // Block row of edge e of slot s in group g, -1 if the slot has no edge e.
  function automatic int edge_row(int s, int g, int e);
    int n = 0;
    for (int r = 0; r < MB; r++)
      if (has_row(s, g, r)) begin
        if (n == e) return r;
        n++;
      end
    return -1;
  endfunction

  // VNU edge of slot s that connects to block row r in group g.
  function automatic int row_edge(int s, int g, int r);
    int n = 0;
    for (int t = 0; t < r; t++) if (has_row(s, g, t)) n++;
    return n;
  endfunction

  // Sign-magnitude of a two's-complement value, magnitude saturated.
  function automatic sm_t tc_to_sm(logic signed [W-1:0] v);
    sm_t o;
    logic [W-1:0] a;
    o.sgn = v[W-1];
    a = v[W-1] ? W'(-v) : W'(v);
    o.mag = (a > W'(MAG_MAX)) ? MAG_MAX : a[MW-1:0];
    return o;
  endfunction

endpackage
