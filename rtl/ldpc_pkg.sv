// ldpc_pkg: code description, number formats and schedule of the parallel
// layered decoder for the rate-1/2, length-2304 WiMax (IEEE 802.16e) QC-LDPC code.
//
// The code is given by a 12 x 24 base matrix HB of cyclic shifts; -1 marks an
// all-zero 96 x 96 block. Shift s means row r of the block has its one in
// column (r + s) mod 96. Block row i of H is "layer i"; every layer has its own
// processing unit and all twelve run at the same time, one row per clock.
//
// Schedule. Layer i processes row (t + ROW_START[i]) mod 96 at decode cycle t,
// so it touches column c of block column j at the cycles t with
// t = c - EFF(i,j) (mod 96), EFF(i,j) = (HB[i][j] + ROW_START[i]) mod 96.
// The updated APP value of that column is sent to the layer k of the same block
// column that touches it next, i.e. the one whose EFF(k,j) is the largest value
// cyclically below EFF(i,j); GAP(i,j) = (EFF(i,j) - EFF(k,j)) mod 96 cycles
// later. With all ROW_START = 0 this is exactly the rule "send to the layer with
// the largest shift cyclically smaller than this layer's shift". The start rows
// below are this design's own choice: they were found by a search that
// maximises the smallest GAP over all 76 non-zero blocks (result: 8 cycles), so
// that a message always reaches its next user after the PIPE_LAT-cycle
// read-to-write pipeline of a layer. Without them the two layers sharing a
// dual-diagonal parity column would touch the same column in the same cycle.
//
// Number formats (this design's choice): channel LLR 6-bit, APP 8-bit, both
// two's complement and saturated symmetrically; CTV magnitudes are the check
// minimum saturated to 31 then scaled by alpha = 0.75 as floor(3*m/4).
package ldpc_pkg;

  localparam int Z     = 96;        // expansion (block) size
  localparam int MB    = 12;        // block rows = layers
  localparam int NB    = 24;        // block columns
  localparam int N     = NB * Z;    // code length 2304
  localparam int MAXD  = 7;         // largest row degree
  localparam int NEDGE = 76;        // non-zero blocks in HB
  localparam int ROW_W = 7;         // bits of a row / column index inside a block
  localparam int LLR_W = 6;         // channel LLR width
  localparam int APP_W = 8;         // APP (summation) message width
  localparam int MAG_W = 5;         // CTV magnitude width
  localparam int MAG_MAX = (1 << MAG_W) - 1;
  localparam int APP_MAX = (1 << (APP_W - 1)) - 1;
  localparam int LLR_MAX = (1 << (LLR_W - 1)) - 1;
  localparam int PIPE_LAT = 4;      // cycles from APP read address to APP write

  // Base matrix of the rate-1/2 code, Z = 96 (802.16e-2005, Table 'rate 1/2').
  localparam int HB [MB][NB] = '{
    '{-1,94,73,-1,-1,-1,-1,-1,55,83,-1,-1, 7, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{-1,27,-1,-1,-1,22,79, 9,-1,-1,-1,12,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{-1,-1,-1,24,22,81,-1,33,-1,-1,-1, 0,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1},
    '{61,-1,47,-1,-1,-1,-1,-1,65,25,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1},
    '{-1,-1,39,-1,-1,-1,84,-1,-1,41,72,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1},
    '{-1,-1,-1,-1,46,40,-1,82,-1,-1,-1,79, 0,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1},
    '{-1,-1,95,53,-1,-1,-1,-1,-1,14,18,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1},
    '{-1,11,73,-1,-1,-1, 2,-1,-1,47,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1},
    '{12,-1,-1,-1,83,24,-1,43,-1,-1,-1,51,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1},
    '{-1,-1,-1,-1,-1,94,-1,59,-1,-1,70,72,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1},
    '{-1,-1, 7,65,-1,-1,-1,-1,39,49,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0},
    '{43,-1,-1,-1,-1,66,-1,41,-1,-1,-1,26, 7,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0}
  };

  // Row each layer starts its sweep at (decode cycle 0).
  localparam int ROW_START [MB] = '{0, 42, 89, 1, 17, 52, 90, 45, 58, 27, 1, 36};

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [APP_W-1:0] app_t;
  typedef logic [ROW_W-1:0]        row_t;

  // Compressed CTV word of one check row: sign of r for every lane, the two
  // smallest scaled magnitudes and the lane holding the smallest.
  typedef struct packed {
    logic [MAXD-1:0]  sgn;
    logic [MAG_W-1:0] min1;
    logic [MAG_W-1:0] min2;
    logic [2:0]       idx;
  } ctv_t;

  // ---------------------------------------------------------------- helpers
  function automatic int row_deg(int i);
    int d = 0;
    for (int j = 0; j < NB; j++) if (HB[i][j] >= 0) d++;
    return d;
  endfunction

  // block column of the l-th non-zero block of layer i
  function automatic int nz_col(int i, int l);
    int d = 0;
    for (int j = 0; j < NB; j++)
      if (HB[i][j] >= 0) begin
        if (d == l) return j;
        d++;
      end
    return 0;
  endfunction

  // lane (position among the non-zero blocks) of block column j in layer i
  function automatic int lane_of(int i, int j);
    int d = 0;
    for (int c = 0; c < j; c++) if (HB[i][c] >= 0) d++;
    return d;
  endfunction

  // index of the first edge (non-zero block) of layer i; edges are row-major
  function automatic int edge_base(int i);
    int e = 0;
    for (int k = 0; k < i; k++) e += row_deg(k);
    return e;
  endfunction

  function automatic int edge_layer(int e);
    int b = 0;
    for (int i = 0; i < MB; i++) begin
      b += row_deg(i);
      if (e < b) return i;
    end
    return MB - 1;
  endfunction

  function automatic int edge_col(int e);
    int i = edge_layer(e);
    return nz_col(i, e - edge_base(i));
  endfunction

  // number of layers that have a non-zero block in block column j
  function automatic int col_deg(int j);
    int d = 0;
    for (int i = 0; i < MB; i++) if (HB[i][j] >= 0) d++;
    return d;
  endfunction

  // edge index of the k-th non-zero block (top to bottom) of block column j
  function automatic int col_edge(int j, int k);
    int d = 0;
    for (int i = 0; i < MB; i++)
      if (HB[i][j] >= 0) begin
        if (d == k) return edge_base(i) + lane_of(i, j);
        d++;
      end
    return 0;
  endfunction

  function automatic int eff(int i, int j);
    return (HB[i][j] + ROW_START[i]) % Z;
  endfunction

  // layer that receives the APP message layer i produces in block column j
  function automatic int succ_layer(int i, int j);
    int best = i;
    int bg = Z + 1;
    for (int k = 0; k < MB; k++)
      if (k != i && HB[k][j] >= 0) begin
        int g = (eff(i, j) - eff(k, j) + Z) % Z;
        if (g > 0 && g < bg) begin
          bg = g;
          best = k;
        end
      end
    return best;
  endfunction

  // cycles between layer i touching a column of block column j and its successor doing so
  function automatic int gap(int i, int j);
    return (eff(i, j) - eff(succ_layer(i, j), j) + Z) % Z;
  endfunction

  // destination edge (memory Mem k-j) of the message produced on edge e
  function automatic int dest_edge(int e);
    int i = edge_layer(e);
    int j = edge_col(e);
    int k = succ_layer(i, j);
    return edge_base(k) + lane_of(k, j);
  endfunction

  // layer whose APP message in block column j is sent to layer k
  function automatic int pred_layer(int k, int j);
    int best = k;
    int bg = Z + 1;
    for (int i = 0; i < MB; i++)
      if (i != k && HB[i][j] >= 0) begin
        int g = (eff(i, j) - eff(k, j) + Z) % Z;
        if (g > 0 && g < bg) begin
          bg = g;
          best = i;
        end
      end
    return best;
  endfunction

  // edge whose message is written into memory of edge d
  function automatic int pred_edge(int d);
    int k = edge_layer(d);
    int j = edge_col(d);
    int i = pred_layer(k, j);
    return edge_base(i) + lane_of(i, j);
  endfunction

  function automatic int shift(int i, int j);
    return HB[i][j];
  endfunction

  // address offset from the source row to the destination row
  function automatic int dest_offset(int e);
    int i = edge_layer(e);
    int j = edge_col(e);
    int k = succ_layer(i, j);
    return (HB[i][j] - HB[k][j] + Z) % Z;
  endfunction

  function automatic int min_gap();
    int g = Z;
    for (int e = 0; e < NEDGE; e++)
      if (gap(edge_layer(e), edge_col(e)) < g) g = gap(edge_layer(e), edge_col(e));
    return g;
  endfunction

  // (a + b) mod Z for a < Z, 0 <= b < Z
  function automatic row_t add_mod(row_t a, int b);
    logic [ROW_W:0] s;
    s = {1'b0, a} + (ROW_W + 1)'(b);
    if (s >= (ROW_W + 1)'(Z)) s = s - (ROW_W + 1)'(Z);
    return s[ROW_W-1:0];
  endfunction

  function automatic app_t sat_app(logic signed [APP_W+1:0] v);
    if (v > (APP_W + 2)'(APP_MAX)) return app_t'(APP_MAX);
    if (v < -(APP_W + 2)'(APP_MAX)) return app_t'(-APP_MAX);
    return v[APP_W-1:0];
  endfunction

  // normalised magnitude: floor(0.75 * min(m, MAG_MAX))
  function automatic logic [MAG_W-1:0] scale_mag(logic [APP_W-1:0] m);
    logic [MAG_W+1:0] t;
    logic [MAG_W-1:0] ms;
    ms = (m > APP_W'(MAG_MAX)) ? MAG_W'(MAG_MAX) : m[MAG_W-1:0];
    t = {2'b00, ms} + {1'b0, ms, 1'b0};
    return t[MAG_W+1:2];
  endfunction

endpackage
