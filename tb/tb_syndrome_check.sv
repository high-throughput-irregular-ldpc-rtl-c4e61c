// tb_syndrome_check: the all-zero word, random codewords (encoded in the
// testbench with the dual-diagonal parity structure) and random words with
// bit errors; the syndrome is recomputed independently check by check.
module tb_syndrome_check;
  import ldpc_pkg::*;
  logic [N-1:0]    hard = '0;
  logic [MB*Z-1:0] syndrome;
  logic            syn_ok;
  int checks = 0, failures = 0;

  syndrome_check dut (.*);

  bit cw [N];

  function automatic void encode();
    bit lam [MB][Z];
    bit p0 [Z];
    for (int n = 0; n < 12 * Z; n++) cw[n] = 1'($urandom);
    for (int i = 0; i < MB; i++)
      for (int r = 0; r < Z; r++) begin
        lam[i][r] = 0;
        for (int j = 0; j < 12; j++)
          if (HB[i][j] >= 0) lam[i][r] ^= cw[j*Z + (r + HB[i][j]) % Z];
      end
    for (int r = 0; r < Z; r++) begin
      p0[r] = 0;
      for (int i = 0; i < MB; i++) p0[r] ^= lam[i][r];
    end
    for (int r = 0; r < Z; r++) cw[12*Z + r] = p0[r];
    for (int r = 0; r < Z; r++) cw[13*Z + r] = lam[0][r] ^ p0[(r + 7) % Z];
    for (int i = 1; i <= 10; i++)
      for (int r = 0; r < Z; r++)
        cw[(13+i)*Z + r] = lam[i][r] ^ cw[(12+i)*Z + r] ^ ((i == 5) ? p0[r] : 1'b0);
  endfunction

  task automatic compare(input bit expect_ok, input string what);
    bit any = 0;
    for (int i = 0; i < MB; i++)
      for (int r = 0; r < Z; r++) begin
        bit s = 0;
        for (int j = 0; j < NB; j++)
          if (HB[i][j] >= 0) s ^= hard[j*Z + (r + HB[i][j]) % Z];
        any |= s;
        checks++;
        if (syndrome[i*Z + r] != s) failures++;
      end
    checks += 2;
    if (syn_ok != !any) begin failures++; $display("%s: syn_ok wrong", what); end
    if (syn_ok != expect_ok) begin failures++; $display("%s: syn_ok %0d", what, syn_ok); end
  endtask

  initial begin
    hard = '0;
    #1 compare(1, "zero");
    for (int t = 0; t < 10; t++) begin
      encode();
      for (int n = 0; n < N; n++) hard[n] = cw[n];
      #1 compare(1, "codeword");
      hard[$urandom % N] ^= 1'b1;
      #1 compare(0, "one error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
