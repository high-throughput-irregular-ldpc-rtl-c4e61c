// tb_ctv_mem: random writes, clears and reads of the CTV memory against a
// testbench model; clear has priority and writes an all-zero word.
module tb_ctv_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  row_t rd_addr = '0, wr_addr = '0, clr_addr = '0;
  ctv_t rd_data, wr_data = '0;
  logic wr_en = 0, clr_en = 0;
  int checks = 0, failures = 0;
  ctv_t model [Z];

  ctv_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < Z; a++) begin
      clr_en <= 1; clr_addr <= row_t'(a);
      model[a] = '0;
      @(posedge clk);
    end
    clr_en <= 0;
    for (int t = 0; t < 3000; t++) begin
      int ra, wa, ca;
      bit we, ce;
      ctv_t wd, expv;
      ra = $urandom % Z;
      wa = (t % 3 == 0) ? ra : int'($urandom % Z);
      ca = (t % 5 == 0) ? wa : int'($urandom % Z);
      we = 1'($urandom);
      ce = ($urandom % 4) == 0;
      wd = ctv_t'($urandom);
      rd_addr <= row_t'(ra);
      wr_en <= we; wr_addr <= row_t'(wa); wr_data <= wd;
      clr_en <= ce; clr_addr <= row_t'(ca);
      expv = model[ra];
      @(posedge clk);
      if (ce) model[ca] = '0;
      else if (we) model[wa] = wd;
      #1;
      checks++;
      if (rd_data != expv) begin
        failures++;
        $display("t %0d addr %0d: read %h expected %h", t, ra, rd_data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
