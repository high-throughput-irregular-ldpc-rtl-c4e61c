// ctv_mem: "CTV Memory" of one layer. It keeps, for each of the 96 check rows
// of the layer, the compressed check-to-variable messages of the last update
// (lane signs, two smallest scaled magnitudes, index of the smallest), which
// the VNU subtracts from the APP messages at the next visit of the row.
// The compressed form is this design's choice. Synchronous read (one cycle),
// one write port; clear writes an all-zero word (r = 0, the initial CTV value)
// and has priority over a normal write.
module ctv_mem
  import ldpc_pkg::*;
#(
  parameter int DEPTH = Z
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output ctv_t                     rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  ctv_t                     wr_data,
  input  logic                     clr_en,
  input  logic [$clog2(DEPTH)-1:0] clr_addr
);
  ctv_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (clr_en)     mem[clr_addr] <= '0;
    else if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
