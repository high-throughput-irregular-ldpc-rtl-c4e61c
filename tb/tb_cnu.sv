// tb_cnu: random check rows through the two-stage normalised min-sum CNU.
// Expected values are computed directly from the definition: for every lane
// the minimum |q| over the other lanes (saturated to 31) scaled by 0.75
// (floor), the sign product of the other lanes, and Lambda_new = sat(q + r).
// Also checks the two-cycle latency and that flush drops a row in flight.
module tb_cnu;
  import ldpc_pkg::*;
  localparam int D = 7;
  logic clk = 0, rst_n = 0, flush = 0, in_valid = 0;
  app_t [D-1:0] q_in;
  logic out_valid;
  app_t [D-1:0] app_new;
  ctv_t ctv_new;
  int checks = 0, failures = 0;

  cnu #(.D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return (v > APP_MAX) ? APP_MAX : ((v < -APP_MAX) ? -APP_MAX : v);
  endfunction

  int qv [D];
  int exp_app [D];
  int exp_r [D];

  function automatic void expect_row();
    for (int l = 0; l < D; l++) begin
      int m = MAG_MAX;
      bit s = 0;
      for (int k = 0; k < D; k++)
        if (k != l) begin
          int a = (qv[k] < 0) ? -qv[k] : qv[k];
          if (a < m) m = a;
          s ^= (qv[k] < 0);
        end
      exp_r[l] = s ? -((3 * m) / 4) : (3 * m) / 4;
      exp_app[l] = sat(qv[l] + exp_r[l]);
    end
  endfunction

  initial begin
    q_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      for (int l = 0; l < D; l++) begin
        case (t % 3)
          0: qv[l] = int'($urandom % 255) - 127;
          1: qv[l] = int'($urandom % 61) - 30;
          default: qv[l] = int'($urandom % 9) - 4;
        endcase
        q_in[l] <= app_t'(qv[l]);
      end
      in_valid <= 1;
      expect_row();
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (out_valid) begin failures++; $display("valid too early"); end
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("valid missing"); end
      for (int l = 0; l < D; l++) begin
        int m;
        checks++;
        if (int'(app_new[l]) != exp_app[l]) begin
          failures++;
          $display("row %0d lane %0d: app %0d expected %0d", t, l, app_new[l], exp_app[l]);
        end
        m = (int'(ctv_new.idx) == l) ? int'(ctv_new.min2) : int'(ctv_new.min1);
        checks++;
        if ((ctv_new.sgn[l] ? -m : m) != exp_r[l]) begin
          failures++;
          $display("row %0d lane %0d: ctv r %0d expected %0d", t, l, ctv_new.sgn[l] ? -m : m, exp_r[l]);
        end
      end
    end
    // flush drops a row in flight
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    flush <= 1;
    @(posedge clk);
    flush <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("flush did not cancel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
