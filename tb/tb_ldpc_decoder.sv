// tb_ldpc_decoder: end-to-end test of the decoder at its real size (2304-bit
// code, all twelve layers). It encodes random information words with the
// dual-diagonal structure of the code, sends them over a noisy BPSK channel
// (Gaussian noise approximated by a sum of 12 uniform variables), quantises
// the received values to 6-bit LLRs and decodes them. A reference model in the
// testbench runs the same layered normalised min-sum schedule on plain integer
// arrays (every layer processing row (t + ROW_START) mod 96 at cycle t,
// updates applied immediately) and must agree bit for bit with the hardware:
// decoded word, number of iterations and convergence flag. The testbench also
// checks that the decoded word equals the transmitted codeword when decoding
// converges, that done rises 96*n + 5 cycles after the last load beat, and
// that each mechanism happened: early stop on H x = 0, stop at the iteration
// limit, correction of channel errors, message forwarding with the minimum
// spacing, a frame loaded directly after the previous one finished, and a
// frame running all 10 iterations, whose period (1061 cycles) is checked.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           llr_valid = 1'b0;
  llr_t [NB-1:0]  llr_in = '0;
  logic [5:0]     max_iter = 6'd10;
  logic           in_ready, busy, done, converged;
  logic [5:0]     iter_count;
  logic [N-1:0]   hard_bits;

  int checks = 0, failures = 0;
  int n_early = 0, n_maxit = 0, n_corrected = 0, n_b2b = 0, n_ten = 0;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ encoder
  bit cw [N];
  int llr [N];

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

  function automatic int count_unsat(bit x [N]);
    int u = 0;
    for (int i = 0; i < MB; i++)
      for (int r = 0; r < Z; r++) begin
        bit s = 0;
        for (int j = 0; j < NB; j++)
          if (HB[i][j] >= 0) s ^= x[j*Z + (r + HB[i][j]) % Z];
        u += s;
      end
    return u;
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic int channel(real amp, real sigma);
    int nerr = 0;
    for (int n = 0; n < N; n++) begin
      real y = (cw[n] ? -amp : amp) + sigma * gauss();
      int  q = (y >= 0.0) ? int'(y + 0.5) : -int'(-y + 0.5);
      if (q > LLR_MAX) q = LLR_MAX;
      if (q < -LLR_MAX) q = -LLR_MAX;
      llr[n] = q;
      if ((q <= 0) != cw[n]) nerr++;
    end
    return nerr;
  endfunction

  // ------------------------------------------------------------ reference
  bit ref_hard [N];
  int ref_iters;
  bit ref_conv;

  function automatic int sat(int v, int m);
    return (v > m) ? m : ((v < -m) ? -m : v);
  endfunction

  function automatic void ref_decode(int maxit);
    int lam [N];
    int rr [MB][Z][MAXD];
    int it;
    if (maxit == 0) maxit = 1;
    for (int n = 0; n < N; n++) lam[n] = llr[n];
    for (int i = 0; i < MB; i++) for (int r = 0; r < Z; r++) for (int l = 0; l < MAXD; l++) rr[i][r][l] = 0;
    ref_conv = 0;
    for (it = 1; it <= maxit; it++) begin
      for (int t = 0; t < Z; t++)
        for (int i = 0; i < MB; i++) begin
          int row = (t + ROW_START[i]) % Z;
          int d = 0;
          int idx [MAXD];
          int q [MAXD];
          for (int j = 0; j < NB; j++)
            if (HB[i][j] >= 0) begin
              idx[d] = j*Z + (row + HB[i][j]) % Z;
              q[d] = sat(lam[idx[d]] - rr[i][row][d], APP_MAX);
              d++;
            end
          for (int l = 0; l < d; l++) begin
            int m = MAG_MAX;
            bit sg = 0;
            int rn;
            for (int k = 0; k < d; k++)
              if (k != l) begin
                int a = (q[k] < 0) ? -q[k] : q[k];
                if (a < m) m = a;
                sg ^= (q[k] < 0);
              end
            rn = (3 * m) / 4;
            if (sg) rn = -rn;
            rr[i][row][l] = rn;
            lam[idx[l]] = sat(q[l] + rn, APP_MAX);
          end
        end
      for (int n = 0; n < N; n++) ref_hard[n] = (lam[n] <= 0);
      if (count_unsat(ref_hard) == 0) begin
        ref_conv = 1;
        break;
      end
      if (it == maxit) break;
    end
    ref_iters = (it > maxit) ? maxit : it;
  endfunction

  // ------------------------------------------------------------ one frame
  task automatic run_frame(real sigma, int maxit, bit back_to_back, string name);
    int nerr, lat, hw_errs, ref_diff, ld;
    bit hw [N];
    nerr = channel(8.0, sigma);
    max_iter = 6'(maxit);
    ref_decode(maxit);
    if (back_to_back) begin
      check(in_ready, {name, ": in_ready while done"});
      if (done && in_ready) n_b2b++;
    end
    ld = 0;
    for (int c = 0; c < Z; c++) begin
      llr_valid <= 1'b1;
      for (int j = 0; j < NB; j++) llr_in[j] <= llr_t'(llr[j*Z + c]);
      @(posedge clk);
      ld++;
      while (!in_ready) begin
        @(posedge clk);
        ld++;
      end
    end
    llr_valid <= 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (!done && lat < 5000);
    for (int n = 0; n < N; n++) hw[n] = hard_bits[n];
    hw_errs = 0;
    ref_diff = 0;
    for (int n = 0; n < N; n++) begin
      hw_errs  += (hw[n] != cw[n]);
      ref_diff += (hw[n] != ref_hard[n]);
    end
    $display("%s: sigma=%0.1f channel errors=%0d iterations=%0d converged=%0d residual errors=%0d latency=%0d",
             name, sigma, nerr, iter_count, converged, hw_errs, lat);
    check(ref_diff == 0, $sformatf("%s: %0d decoded bits differ from reference", name, ref_diff));
    check(iter_count == 6'(ref_iters), $sformatf("%s: iterations %0d, reference %0d", name, iter_count, ref_iters));
    check(converged == ref_conv, $sformatf("%s: converged %0d, reference %0d", name, converged, ref_conv));
    check(lat == Z * int'(iter_count) + PIPE_LAT + 1, $sformatf("%s: done after %0d cycles", name, lat));
    // frame period: 96 load beats, one per cycle, then the decode
    check(ld == Z, $sformatf("%s: load took %0d cycles", name, ld));
    if (iter_count == 6'd10) begin
      n_ten++;
      $display("%s: %0d cycles per frame at 10 iterations = %0.2f Gbit/s of code bits at 950 MHz",
               name, ld + lat, real'(N) * 0.95 / real'(ld + lat));
      check(ld + lat == Z + 10 * Z + PIPE_LAT + 1, {name, ": frame period at 10 iterations"});
    end
    if (converged) begin
      check(count_unsat(hw) == 0, {name, ": converged but H x != 0"});
      check(hw_errs == 0, $sformatf("%s: converged to a word with %0d errors", name, hw_errs));
      if (int'(iter_count) < maxit) n_early++;
      if (nerr > 0 && hw_errs == 0) n_corrected++;
    end else begin
      check(int'(iter_count) == ((maxit == 0) ? 1 : maxit), {name, ": stopped early without converging"});
      n_maxit++;
    end
  endtask

  initial begin
    int g;
    bit cwt [N];
    // schedule sanity: every message has at least PIPE_LAT+1 cycles to travel
    g = min_gap();
    check(g > PIPE_LAT, $sformatf("minimum message gap %0d", g));
    // encoder sanity
    encode();
    for (int n = 0; n < N; n++) cwt[n] = cw[n];
    check(count_unsat(cwt) == 0, "encoder produced a non-codeword");

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    encode(); run_frame(0.0, 10, 1'b0, "noiseless");
    encode(); run_frame(5.0, 10, 1'b1, "sigma5");
    encode(); run_frame(6.5, 10, 1'b1, "sigma6.5");
    encode(); run_frame(7.0, 10, 1'b1, "sigma7");
    encode(); run_frame(14.0, 3, 1'b1, "heavy");
    encode(); run_frame(6.0, 20, 1'b0, "sigma6_max20");

    check(n_early > 0, "no frame stopped early on H x = 0");
    check(n_maxit > 0, "no frame stopped at the iteration limit");
    check(n_corrected > 0, "no channel errors were corrected");
    check(n_b2b > 0, "no back-to-back frame");
    check(n_ten > 0, "no frame ran the full 10 iterations");
    $display("mechanisms: early_stop=%0d max_iter_stop=%0d corrected=%0d back_to_back=%0d",
             n_early, n_maxit, n_corrected, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
