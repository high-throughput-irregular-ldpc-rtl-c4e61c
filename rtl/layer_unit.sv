// layer_unit: processing unit of one layer (block row) of H. Every clock it
// takes the next check row of its 96-row sweep, reads the APP messages of the
// row's D variables from its own APP memories (address = row number) and the
// row's old CTV word, and then
//   cycle t   : row = (phase + ROW_START[LAYER]) mod 96 -> memory addresses
//   cycle t+1 : VNU  q = Lambda - r_old                 (register)
//   cycle t+2 : CNU stage A, minimum search            (register)
//   cycle t+3 : CNU stage B, r_new and Lambda_new      (register)
//   cycle t+4 : CTV word written back, Lambda_new sent through the connection
//               network to the successor layers' memories and the hard
//               decisions to the decision buffer (all written at the end of t+4)
// So a row is read at t and its results are written PIPE_LAT = 4 cycles later;
// the start rows guarantee that no other layer needs these results earlier.
// run marks a cycle whose row is to be processed; flush cancels all rows in
// flight (also the one being written in the current cycle). clr_en/clr_addr
// reset CTV words to zero while a new frame is loaded.
module layer_unit
  import ldpc_pkg::*;
#(
  parameter int LAYER = 0,
  localparam int D = row_deg(LAYER)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          flush,
  input  row_t          phase,
  input  logic          clr_en,
  input  row_t          clr_addr,
  // APP memory read port (address shared by all D memories of the layer)
  output row_t          rd_addr,
  input  app_t [D-1:0]  rd_data,
  // APP messages towards the successor layers' memories
  output logic [D-1:0]  wr_en,
  output row_t [D-1:0]  wr_addr,
  output app_t [D-1:0]  wr_data,
  // hard decisions
  output logic          dec_valid,
  output row_t [D-1:0]  dec_col,
  output logic [D-1:0]  dec_bit
);
  row_t row0, row1, row2, row3, row4;
  logic v1, v2, v4, wv;
  ctv_t ctv_rd, ctv_wr;
  app_t [D-1:0] q, app_new;

  assign row0    = add_mod(phase, ROW_START[LAYER]);
  assign rd_addr = row0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     v1 <= 1'b0;
    else if (flush) v1 <= 1'b0;
    else            v1 <= run;
  end

  always_ff @(posedge clk) begin
    row1 <= row0;
    row2 <= row1;
    row3 <= row2;
    row4 <= row3;
  end

  ctv_mem u_ctv (
    .clk, .rd_addr(row0), .rd_data(ctv_rd),
    .wr_en(wv), .wr_addr(row4), .wr_data(ctv_wr),
    .clr_en, .clr_addr
  );

  vnu #(.D(D)) u_vnu (
    .clk, .rst_n, .flush, .in_valid(v1), .app_in(rd_data), .ctv_old(ctv_rd),
    .out_valid(v2), .q_out(q)
  );

  cnu #(.D(D)) u_cnu (
    .clk, .rst_n, .flush, .in_valid(v2), .q_in(q),
    .out_valid(v4), .app_new, .ctv_new(ctv_wr)
  );

  assign wv = v4 & ~flush;

  conn_network #(.LAYER(LAYER)) u_net (
    .in_valid(wv), .row(row4), .app_new, .wr_en, .wr_addr, .wr_data
  );

  decision_unit #(.LAYER(LAYER)) u_dec (
    .in_valid(wv), .row(row4), .app_new, .dec_valid, .dec_col, .dec_bit
  );
endmodule
