// conn_network: "Connection Network" of one layer. Every lane (block column j)
// of layer LAYER always sends its updated APP message to the same memory,
// Mem k-j of the successor layer k = succ_layer(LAYER, j) (see ldpc_pkg), so
// the network is fixed wiring plus one constant modulo-96 address adder per
// lane: the word goes to address (row + HB[LAYER][j] - HB[k][j]) mod 96, the row
// at which layer k will meet the same variable. Lane l drives the write port of
// edge dest_edge(edge_base(LAYER) + l); the top level does that wiring.
// Combinational.
module conn_network
  import ldpc_pkg::*;
#(
  parameter int LAYER = 0,
  localparam int D = row_deg(LAYER)
) (
  input  logic               in_valid,
  input  row_t               row,
  input  app_t [D-1:0]       app_new,
  output logic [D-1:0]       wr_en,
  output row_t [D-1:0]       wr_addr,
  output app_t [D-1:0]       wr_data
);
  localparam int EB = edge_base(LAYER);

  assign wr_data = app_new;

  for (genvar l = 0; l < D; l++) begin : g_lane
    localparam int OFF = dest_offset(EB + l);
    assign wr_en[l]   = in_valid;
    assign wr_addr[l] = add_mod(row, OFF);
  end
endmodule
