// app_mem_bank: the APP memory bank. It holds one memory Mem i-j (app_mem,
// 96 words) per non-zero block (i,j) of the base matrix, 76 in all, grouped per
// layer, as in the published architecture. All memories of layer i are read
// with the same address, the row layer i is about to process. Each memory has
// exactly one writer, the connection network lane of its predecessor layer, so
// the write ports come in indexed by destination edge and need no arbitration.
// Loading: during a load beat the 24 channel LLRs of variable index load_idx
// (one per block column) are written, sign-extended, into every memory of
// their block column at address (load_idx - HB[i][j]) mod 96, the row at which
// layer i meets that variable. A load beat overrides a decoder write.
module app_mem_bank
  import ldpc_pkg::*;
(
  input  logic                   clk,
  input  row_t [MB-1:0]          rd_addr,
  output app_t [NEDGE-1:0]       rd_data,
  input  logic [NEDGE-1:0]       wr_en,
  input  row_t [NEDGE-1:0]       wr_addr,
  input  app_t [NEDGE-1:0]       wr_data,
  input  logic                   load_en,
  input  row_t                   load_idx,
  input  llr_t [NB-1:0]          load_llr
);
  for (genvar e = 0; e < NEDGE; e++) begin : g_mem
    localparam int I = edge_layer(e);
    localparam int J = edge_col(e);
    localparam int S = shift(I, J);

    logic we;
    row_t wa;
    app_t wd;

    always_comb begin
      if (load_en) begin
        we = 1'b1;
        wa = add_mod(load_idx, (Z - S) % Z);
        wd = app_t'({{(APP_W-LLR_W){load_llr[J][LLR_W-1]}}, load_llr[J]});
      end else begin
        we = wr_en[e];
        wa = wr_addr[e];
        wd = wr_data[e];
      end
    end

    app_mem #(.DEPTH(Z)) u_mem (
      .clk, .rd_addr(rd_addr[I]), .rd_data(rd_data[e]),
      .wr_en(we), .wr_addr(wa), .wr_data(wd)
    );
  end
endmodule
