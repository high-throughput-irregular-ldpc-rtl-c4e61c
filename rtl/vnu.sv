// vnu: variable node update for the D block columns of one check row.
// It rebuilds the old CTV message of every lane from the compressed CTV word
// (magnitude min2 for the lane that held the minimum, min1 for the others,
// with the stored sign) and forms the VTC message q = Lambda - r_old, saturated
// to the APP range. One pipeline register: q and valid appear one cycle after
// the inputs. flush clears the valid bit.
module vnu
  import ldpc_pkg::*;
#(
  parameter int D = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic           in_valid,
  input  app_t [D-1:0]   app_in,
  input  ctv_t           ctv_old,
  output logic           out_valid,
  output app_t [D-1:0]   q_out
);
  app_t [D-1:0] q_c;

  always_comb begin
    for (int l = 0; l < D; l++) begin
      logic [MAG_W-1:0]        mag;
      logic signed [APP_W+1:0] r, diff;
      mag  = (ctv_old.idx == 3'(l)) ? ctv_old.min2 : ctv_old.min1;
      r    = ctv_old.sgn[l] ? -$signed((APP_W+2)'(mag)) : $signed((APP_W+2)'(mag));
      diff = $signed({{2{app_in[l][APP_W-1]}}, app_in[l]}) - r;
      q_c[l] = sat_app(diff);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_valid <= 1'b0;
    else if (flush)  out_valid <= 1'b0;
    else             out_valid <= in_valid;
  end

  always_ff @(posedge clk) q_out <= q_c;
endmodule
