// tb_app_mem: random reads and writes against a testbench copy of the memory;
// checks the one-cycle read latency and that a read in the cycle of a write
// to the same address returns the old word.
module tb_app_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  row_t rd_addr = '0, wr_addr = '0;
  app_t rd_data, wr_data = '0;
  logic wr_en = 0;
  int checks = 0, failures = 0;
  int model [Z];

  app_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < Z; a++) begin
      model[a] = int'($urandom % 255) - 127;
      wr_en <= 1; wr_addr <= row_t'(a); wr_data <= app_t'(model[a]);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int t = 0; t < 2000; t++) begin
      int ra, expv;
      bit we;
      int wa, wd;
      ra = $urandom % Z;
      we = 1'($urandom);
      wa = (t % 4 == 0) ? ra : int'($urandom % Z);
      wd = int'($urandom % 255) - 127;
      rd_addr <= row_t'(ra);
      wr_en <= we; wr_addr <= row_t'(wa); wr_data <= app_t'(wd);
      expv = model[ra];
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      checks++;
      if (int'(rd_data) != expv) begin
        failures++;
        $display("t %0d addr %0d: read %0d expected %0d", t, ra, rd_data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
