// decision_unit: "Decisions" block of one layer. For every APP message the
// layer has just updated it makes the hard decision x_n = 0 if Lambda_n > 0 and
// x_n = 1 otherwise, and works out which variable of the block column it
// belongs to: column (row + HB[LAYER][j]) mod 96 of block column j.
// Combinational; the bits are written into the decision buffer in the same
// cycle as the APP message is written into the next layer's memory.
module decision_unit
  import ldpc_pkg::*;
#(
  parameter int LAYER = 0,
  localparam int D = row_deg(LAYER)
) (
  input  logic               in_valid,
  input  row_t               row,
  input  app_t [D-1:0]       app_new,
  output logic               dec_valid,
  output row_t [D-1:0]       dec_col,
  output logic [D-1:0]       dec_bit
);
  assign dec_valid = in_valid;

  for (genvar l = 0; l < D; l++) begin : g_lane
    localparam int S = shift(LAYER, nz_col(LAYER, l));
    assign dec_col[l] = add_mod(row, S);
    assign dec_bit[l] = ($signed(app_new[l]) <= 0);
  end
endmodule
