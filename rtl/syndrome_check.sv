// syndrome_check: evaluates all 1152 parity-check equations of H on a hard
// decision word and reports whether H x = 0 (the decoder's stop condition).
// Check m = 96*i + r of layer i is the XOR of bit (r + HB[i][j]) mod 96 of
// every block column j with a non-zero block in layer i. Combinational.
// The stop condition H x = 0 is the algorithm's; checking all equations at
// once on the decision register is this design's choice.
module syndrome_check
  import ldpc_pkg::*;
(
  input  logic [N-1:0]    hard,
  output logic [MB*Z-1:0] syndrome,
  output logic            syn_ok
);
  for (genvar i = 0; i < MB; i++) begin : g_layer
    for (genvar r = 0; r < Z; r++) begin : g_row
      always_comb begin
        logic s;
        s = 1'b0;
        for (int j = 0; j < NB; j++)
          if (HB[i][j] >= 0) s = s ^ hard[j*Z + (r + HB[i][j]) % Z];
        syndrome[i*Z + r] = s;
      end
    end
  end

  assign syn_ok = ~|syndrome;
endmodule
