// tb_decoder_ctrl: drives the controller through several frames with a
// testbench-controlled H x = 0 flag. Checks the load beat counting (with
// gaps in llr_valid), that no beat is accepted while decoding, the phase
// sequence, that run is high and flush low on every decode cycle except the
// stop cycle 96*n + 4, that the stop comes at the first iteration boundary
// with H x = 0 or at max_iter (0 counted as 1), and the done / converged /
// iter_count outputs.
module tb_decoder_ctrl;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, llr_valid = 0, syn_ok = 0;
  logic [5:0] max_iter = 6'd10;
  logic in_ready, load_en, run, flush, busy, done, converged;
  row_t load_idx, phase;
  logic [5:0] iter_count;
  int checks = 0, failures = 0;

  decoder_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ok_from: decode cycle from which syn_ok is 1 (-1: never)
  task automatic frame(input int mi, input int ok_from, input int exp_n, input bit exp_conv);
    int beats = 0;
    int k;
    max_iter <= 6'(mi);
    syn_ok <= 0;
    while (beats < Z) begin
      automatic bit v = ($urandom % 4) != 0;
      llr_valid <= v;
      #1;
      if (v) begin
        chk(load_en && int'(load_idx) == beats, $sformatf("beat %0d idx %0d", beats, load_idx));
        beats++;
      end
      @(posedge clk);
      #1;
      if (beats == 1) chk(!done, "done not cleared by new frame");
    end
    llr_valid <= 1;   // must be ignored while decoding
    k = 0;
    forever begin
      syn_ok = (ok_from >= 0) && (k >= ok_from);
      #1;
      chk(!in_ready && !load_en && busy, "accepting beats while decoding");
      chk(int'(phase) == k % Z, $sformatf("phase %0d at cycle %0d", phase, k));
      if (k == exp_n * Z + PIPE_LAT) begin
        chk(flush && !run, "no stop at expected cycle");
        @(posedge clk);
        #1;
        break;
      end else begin
        chk(run && !flush, $sformatf("unexpected stop at cycle %0d", k));
      end
      if (k > 40 * Z) break;
      @(posedge clk);
      #1;
      k++;
    end
    llr_valid <= 0;
    chk(done && !busy && in_ready, "done not raised");
    chk(int'(iter_count) == exp_n, $sformatf("iter_count %0d expected %0d", iter_count, exp_n));
    chk(converged == exp_conv, "converged flag");
    repeat (3) @(posedge clk);
    #1;
    chk(done, "done not held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    chk(in_ready && !busy && !done, "after reset");
    frame(3, -1, 3, 0);           // iteration limit
    frame(10, 0, 1, 1);           // converged after one iteration
    frame(10, 150, 2, 1);         // H x = 0 appears during iteration 2
    frame(10, 4 * Z + 5, 5, 1);   // appears just after a check instant
    frame(0, -1, 1, 0);           // max_iter 0 runs one iteration
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
