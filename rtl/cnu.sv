// cnu: check node update of one row with normalised min-sum (alpha = 0.75),
// followed by the APP update Lambda_new = q + r_new.
//   Stage A: |q| of every lane (saturated to the CTV magnitude range), the two
//            smallest magnitudes and the lane of the smallest, the sign of every
//            outgoing message (product of the other lanes' signs), scaling by
//            0.75 as floor(3m/4).
//   Stage B: r_new per lane (min2 for the minimum lane, min1 otherwise) and
//            Lambda_new = sat(q + r_new); the compressed CTV word goes out too.
// The split into two register stages is this design's choice (the published
// architecture merges VNU and CNU and pipelines them without fixing the stages).
// Latency: two cycles from q_in to app_new/ctv_new. flush clears the valids.
module cnu
  import ldpc_pkg::*;
#(
  parameter int D = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          in_valid,
  input  app_t [D-1:0]  q_in,
  output logic          out_valid,
  output app_t [D-1:0]  app_new,
  output ctv_t          ctv_new
);
  // ---------------- stage A
  logic [MAG_W-1:0] min1_c, min2_c;
  logic [2:0]       idx_c;
  logic [MAXD-1:0]  rsgn_c;

  always_comb begin
    logic             tot;
    logic [APP_W-1:0] a;
    logic [MAG_W-1:0] m;
    min1_c = MAG_W'(MAG_MAX);
    min2_c = MAG_W'(MAG_MAX);
    idx_c  = '0;
    tot    = 1'b0;
    for (int l = 0; l < D; l++) begin
      a = q_in[l][APP_W-1] ? APP_W'(-q_in[l]) : APP_W'(q_in[l]);
      m = (a > APP_W'(MAG_MAX)) ? MAG_W'(MAG_MAX) : a[MAG_W-1:0];
      tot = tot ^ q_in[l][APP_W-1];
      if (m < min1_c) begin
        min2_c = min1_c;
        min1_c = m;
        idx_c  = 3'(l);
      end else if (m < min2_c) begin
        min2_c = m;
      end
    end
    rsgn_c = '0;
    for (int l = 0; l < D; l++) rsgn_c[l] = tot ^ q_in[l][APP_W-1];
  end

  logic         va;
  app_t [D-1:0] qa;
  ctv_t         ca;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     va <= 1'b0;
    else if (flush) va <= 1'b0;
    else            va <= in_valid;
  end

  always_ff @(posedge clk) begin
    qa      <= q_in;
    ca.sgn  <= rsgn_c;
    ca.min1 <= scale_mag(APP_W'(min1_c));
    ca.min2 <= scale_mag(APP_W'(min2_c));
    ca.idx  <= idx_c;
  end

  // ---------------- stage B
  app_t [D-1:0] app_c;

  always_comb begin
    for (int l = 0; l < D; l++) begin
      logic [MAG_W-1:0]        mag;
      logic signed [APP_W+1:0] r, s;
      mag = (ca.idx == 3'(l)) ? ca.min2 : ca.min1;
      r   = ca.sgn[l] ? -$signed((APP_W+2)'(mag)) : $signed((APP_W+2)'(mag));
      s   = $signed({{2{qa[l][APP_W-1]}}, qa[l]}) + r;
      app_c[l] = sat_app(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     out_valid <= 1'b0;
    else if (flush) out_valid <= 1'b0;
    else            out_valid <= va;
  end

  always_ff @(posedge clk) begin
    app_new <= app_c;
    ctv_new <= ca;
  end
endmodule
