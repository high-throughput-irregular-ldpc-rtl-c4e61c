// app_mem: one APP message memory "Mem i-j" of the APP memory bank, holding the
// 96 summation (APP) messages of block column j that layer i will read next.
// Word a is the message for the variable layer i meets at its row a, so the
// layer reads it with its own row number as address and no crossbar is needed.
// One synchronous read port (data one cycle after the address, old data on a
// read/write collision) and one write port. The contents are not reset: every
// word is written while the channel values are loaded, before any read.
module app_mem
  import ldpc_pkg::*;
#(
  parameter int DEPTH = Z
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output app_t                     rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  app_t                     wr_data
);
  app_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
