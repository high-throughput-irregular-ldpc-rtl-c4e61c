// decision_buffer: the current hard-decision estimate of the 2304-bit codeword.
// While a frame is loaded, bit n is set from the channel value (x = 1 when the
// LLR is <= 0). While decoding, every layer writes the decisions of the
// variables it has just updated; since one variable is held by exactly one
// layer at a time (its APP message travels from layer to layer), at most one
// of the up to six layers of a block column writes a given bit in a cycle.
// Writes take effect at the clock edge; hard is the register contents.
// The decision rule (x_n = 1 unless Lambda_n > 0) is the algorithm's; gathering
// the twelve layers' decisions in one register is this design's choice.
module decision_buffer
  import ldpc_pkg::*;
(
  input  logic                 clk,
  input  logic                 load_en,
  input  row_t                 load_idx,
  input  llr_t [NB-1:0]        load_llr,
  input  logic [NEDGE-1:0]     dec_en,
  input  row_t [NEDGE-1:0]     dec_col,
  input  logic [NEDGE-1:0]     dec_bit,
  output logic [N-1:0]         hard
);
  for (genvar j = 0; j < NB; j++) begin : g_col
    localparam int DC = col_deg(j);
    logic [DC-1:0] en;
    row_t [DC-1:0] col;
    logic [DC-1:0] bits;
    logic [Z-1:0]  blk;

    for (genvar k = 0; k < DC; k++) begin : g_edge
      localparam int E = col_edge(j, k);
      assign en[k]   = dec_en[E];
      assign col[k]  = dec_col[E];
      assign bits[k] = dec_bit[E];
    end

    always_ff @(posedge clk) begin
      if (load_en) begin
        blk[load_idx] <= ($signed(load_llr[j]) <= 0);
      end else begin
        for (int k = 0; k < DC; k++)
          if (en[k]) blk[col[k]] <= bits[k];
      end
    end

    assign hard[j*Z +: Z] = blk;
  end
endmodule
