// ldpc_decoder: parallel layered min-sum decoder for the rate-1/2, 2304-bit
// WiMax QC-LDPC code.
//
// All twelve layers (block rows of H) have their own processing unit
// (layer_unit: VNU, CNU, CTV memory, decisions, connection network) and all of
// them work at the same time, each sweeping its 96 check rows one per clock.
// The APP (summation) message of a variable is not kept in one shared memory:
// it lives in the private memory (Mem i-j of app_mem_bank) of the layer that
// will use it next and, after that layer has updated it, is forwarded over a
// fixed path to the next layer of the same block column. Each block column
// therefore has a fixed cyclic order of layers (e.g. layers 4 -> 12 -> 9 -> 4
// for the first column, counting from 1), messages are updated layer after
// layer as in layered decoding, and there is no crossbar.
//
// Interface: a frame is loaded with 96 beats (llr_valid, in_ready); beat c
// carries the channel LLR of variable c of each of the 24 block columns
// (llr_in[j] is code bit 96*j + c). Decoding starts right after beat 95 and
// runs whole iterations (96 cycles each) until H x = 0 or max_iter iterations
// are done; done then rises, 96*n + 5 cycles after the last beat's clock
// edge, with hard_bits (bit n = x_n), converged and iter_count = n. hard_bits
// stays valid until the next frame's first beat, which may follow at once.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           llr_valid,
  input  llr_t [NB-1:0]  llr_in,
  input  logic [5:0]     max_iter,
  output logic           in_ready,
  output logic           busy,
  output logic           done,
  output logic           converged,
  output logic [5:0]     iter_count,
  output logic [N-1:0]   hard_bits
);
  logic load_en, run, flush, syn_ok;
  row_t load_idx, phase;

  row_t [MB-1:0]     rd_addr;
  app_t [NEDGE-1:0]  rd_data;
  // write ports as produced (indexed by source edge) and as delivered
  // (indexed by destination memory)
  logic [NEDGE-1:0]  src_en,   dst_en;
  row_t [NEDGE-1:0]  src_addr, dst_addr;
  app_t [NEDGE-1:0]  src_data, dst_data;
  logic [NEDGE-1:0]  dec_en, dec_bit;
  row_t [NEDGE-1:0]  dec_col;

  decoder_ctrl u_ctrl (
    .clk, .rst_n, .llr_valid, .max_iter, .syn_ok,
    .in_ready, .load_en, .load_idx, .run, .flush, .phase,
    .busy, .done, .converged, .iter_count
  );

  for (genvar i = 0; i < MB; i++) begin : g_layer
    localparam int D  = row_deg(i);
    localparam int EB = edge_base(i);
    logic dv;

    layer_unit #(.LAYER(i)) u_layer (
      .clk, .rst_n, .run, .flush, .phase,
      .clr_en(load_en), .clr_addr(load_idx),
      .rd_addr(rd_addr[i]), .rd_data(rd_data[EB +: D]),
      .wr_en(src_en[EB +: D]), .wr_addr(src_addr[EB +: D]), .wr_data(src_data[EB +: D]),
      .dec_valid(dv), .dec_col(dec_col[EB +: D]), .dec_bit(dec_bit[EB +: D])
    );
    assign dec_en[EB +: D] = {D{dv}};
  end

  // fixed message-passing paths: memory d is written by its predecessor edge
  for (genvar d = 0; d < NEDGE; d++) begin : g_path
    localparam int P = pred_edge(d);
    assign dst_en[d]   = src_en[P];
    assign dst_addr[d] = src_addr[P];
    assign dst_data[d] = src_data[P];
  end

  app_mem_bank u_bank (
    .clk, .rd_addr, .rd_data,
    .wr_en(dst_en), .wr_addr(dst_addr), .wr_data(dst_data),
    .load_en, .load_idx, .load_llr(llr_in)
  );

  decision_buffer u_dbuf (
    .clk, .load_en, .load_idx, .load_llr(llr_in),
    .dec_en, .dec_col, .dec_bit, .hard(hard_bits)
  );

  syndrome_check u_syn (.hard(hard_bits), .syndrome(), .syn_ok);
endmodule
