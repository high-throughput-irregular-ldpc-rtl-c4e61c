// tb_decision_buffer: loads a random frame (bit = 1 when LLR <= 0), then
// applies random decision writes from all 76 edges, at most one per variable
// and cycle, and compares the whole 2304-bit word with a testbench model.
module tb_decision_buffer;
  import ldpc_pkg::*;
  logic clk = 0;
  logic load_en = 0;
  row_t load_idx = '0;
  llr_t [NB-1:0] load_llr = '0;
  logic [NEDGE-1:0] dec_en = '0, dec_bit = '0;
  row_t [NEDGE-1:0] dec_col = '0;
  logic [N-1:0] hard;
  int checks = 0, failures = 0;
  bit model [N];
  int ecol [NEDGE];

  decision_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    int bad = 0;
    for (int n = 0; n < N; n++) if (hard[n] != model[n]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%0d bits differ", bad); end
  endtask

  initial begin
    automatic int e = 0;
    for (int i = 0; i < MB; i++)
      for (int j = 0; j < NB; j++)
        if (HB[i][j] >= 0) ecol[e++] = j;
    @(negedge clk);
    for (int c = 0; c < Z; c++) begin
      load_en = 1;
      load_idx = row_t'(c);
      for (int j = 0; j < NB; j++) begin
        automatic int v = int'($urandom % 63) - 31;
        if (c % 7 == 0) v = 0;
        load_llr[j] = llr_t'(v);
        model[j*Z + c] = (v <= 0);
      end
      @(negedge clk);
    end
    load_en = 0;
    compare();
    for (int t = 0; t < 300; t++) begin
      bit used [N];
      for (int n = 0; n < N; n++) used[n] = 0;
      for (int k = 0; k < NEDGE; k++) begin
        automatic int c = $urandom % Z;
        automatic int n = ecol[k] * Z + c;
        automatic bit en = 1'($urandom) && !used[n];
        automatic bit b = 1'($urandom);
        dec_en[k] = en;
        dec_col[k] = row_t'(c);
        dec_bit[k] = b;
        if (en) begin used[n] = 1; model[n] = b; end
      end
      @(negedge clk);
      compare();
    end
    dec_en = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
