// tb_vnu: random APP messages and compressed CTV words through the VNU.
// The expected q is Lambda minus the old CTV message rebuilt independently
// (min2 for the stored index lane, min1 otherwise, stored sign), saturated to
// +-127; checks the one-cycle latency and the valid/flush behaviour.
module tb_vnu;
  import ldpc_pkg::*;
  localparam int D = 6;
  logic clk = 0, rst_n = 0, flush = 0, in_valid = 0;
  app_t [D-1:0] app_in;
  ctv_t ctv_old;
  logic out_valid;
  app_t [D-1:0] q_out;
  int checks = 0, failures = 0;

  vnu #(.D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lam [D];
    int exp_q [D];
    app_in = '0;
    ctv_old = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      ctv_t c;
      c.sgn  = 7'($urandom);
      c.min1 = 5'($urandom % 24);
      c.min2 = 5'($urandom % 24);
      c.idx  = 3'($urandom % D);
      for (int l = 0; l < D; l++) begin
        int r;
        lam[l] = int'($urandom % 255) - 127;
        r = (l == int'(c.idx)) ? int'(c.min2) : int'(c.min1);
        if (c.sgn[l]) r = -r;
        exp_q[l] = lam[l] - r;
        if (exp_q[l] > 127) exp_q[l] = 127;
        if (exp_q[l] < -127) exp_q[l] = -127;
        app_in[l] <= app_t'(lam[l]);
      end
      ctv_old  <= c;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("valid missing"); end
      for (int l = 0; l < D; l++) begin
        checks++;
        if (int'(q_out[l]) != exp_q[l]) begin
          failures++;
          $display("t %0d lane %0d: q %0d expected %0d", t, l, q_out[l], exp_q[l]);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("valid stuck"); end
    end
    in_valid <= 1;
    flush <= 1;
    @(posedge clk);
    in_valid <= 0;
    flush <= 0;
    #1;
    checks++;
    if (out_valid) begin failures++; $display("flush ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
