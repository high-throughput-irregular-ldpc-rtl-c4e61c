// tb_app_mem_bank: loads a random frame and reads every memory of every layer
// at random rows; memory (i,j) at address a must return the LLR of variable
// (a + HB[i][j]) mod 96 of block column j. Then random decoder writes per
// edge (and loads overriding them) are checked against a testbench model.
module tb_app_mem_bank;
  import ldpc_pkg::*;
  logic clk = 0;
  row_t [MB-1:0] rd_addr = '0;
  app_t [NEDGE-1:0] rd_data;
  logic [NEDGE-1:0] wr_en = '0;
  row_t [NEDGE-1:0] wr_addr = '0;
  app_t [NEDGE-1:0] wr_data = '0;
  logic load_en = 0;
  row_t load_idx = '0;
  llr_t [NB-1:0] load_llr = '0;
  int checks = 0, failures = 0;
  int model [NEDGE][Z];
  int el [NEDGE], ec [NEDGE];

  app_mem_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    int ra [MB];
    for (int i = 0; i < MB; i++) begin
      ra[i] = $urandom % Z;
      rd_addr[i] = row_t'(ra[i]);
    end
    @(negedge clk);
    for (int e = 0; e < NEDGE; e++) begin
      checks++;
      if (int'(rd_data[e]) != model[e][ra[el[e]]]) begin
        failures++;
        $display("edge %0d addr %0d: %0d expected %0d", e, ra[el[e]], rd_data[e], model[e][ra[el[e]]]);
      end
    end
  endtask

  initial begin
    automatic int e = 0;
    int llr [NB][Z];
    for (int i = 0; i < MB; i++)
      for (int j = 0; j < NB; j++)
        if (HB[i][j] >= 0) begin el[e] = i; ec[e] = j; e++; end
    for (int j = 0; j < NB; j++) for (int c = 0; c < Z; c++) llr[j][c] = int'($urandom % 63) - 31;
    for (e = 0; e < NEDGE; e++)
      for (int a = 0; a < Z; a++) model[e][a] = llr[ec[e]][(a + HB[el[e]][ec[e]]) % Z];
    @(negedge clk);
    for (int c = 0; c < Z; c++) begin
      load_en = 1;
      load_idx = row_t'(c);
      for (int j = 0; j < NB; j++) load_llr[j] = llr_t'(llr[j][c]);
      wr_en = '1;   // a load beat wins over decoder writes
      @(negedge clk);
    end
    load_en = 0;
    wr_en = '0;
    repeat (100) read_all();
    // writes land at the clock edge that also performs the read, so the read
    // returns the old word; the model is updated after the comparison
    for (int t = 0; t < 200; t++) begin
      int pa [NEDGE];
      int pd [NEDGE];
      for (e = 0; e < NEDGE; e++) begin
        automatic bit w = 1'($urandom);
        pa[e] = $urandom % Z;
        pd[e] = int'($urandom % 255) - 127;
        wr_en[e] = w;
        wr_addr[e] = row_t'(pa[e]);
        wr_data[e] = app_t'(pd[e]);
      end
      read_all();
      for (e = 0; e < NEDGE; e++) if (wr_en[e]) model[e][pa[e]] = pd[e];
      wr_en = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
