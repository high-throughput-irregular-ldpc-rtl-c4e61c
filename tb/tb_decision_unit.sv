// tb_decision_unit: random rows and APP values for layer 4 (index 3); the
// hard decision must be 1 exactly when Lambda <= 0 and the variable index
// (row + shift) mod 96, with the shifts read from the base matrix row.
module tb_decision_unit;
  import ldpc_pkg::*;
  localparam int L = 3;
  localparam int D = row_deg(L);
  logic in_valid = 0;
  row_t row = '0;
  app_t [D-1:0] app_new = '0;
  logic dec_valid;
  row_t [D-1:0] dec_col;
  logic [D-1:0] dec_bit;
  int checks = 0, failures = 0;

  decision_unit #(.LAYER(L)) dut (.*);

  initial begin
    int sh [MAXD];
    automatic int d = 0;
    for (int j = 0; j < NB; j++) if (HB[L][j] >= 0) sh[d++] = HB[L][j];
    checks++;
    if (d != D || sh[0] != 61) begin failures++; $display("unexpected base row"); end
    for (int t = 0; t < 1000; t++) begin
      int a [MAXD];
      automatic int r = $urandom % Z;
      automatic bit v = 1'($urandom);
      for (int l = 0; l < D; l++) begin
        a[l] = (t % 4 == 0) ? int'($urandom % 3) - 1 : int'($urandom % 255) - 127;
        app_new[l] = app_t'(a[l]);
      end
      row = row_t'(r);
      in_valid = v;
      #1;
      checks++;
      if (dec_valid != v) failures++;
      for (int l = 0; l < D; l++) begin
        checks += 2;
        if (int'(dec_col[l]) != (r + sh[l]) % Z) begin
          failures++;
          $display("lane %0d row %0d: col %0d", l, r, dec_col[l]);
        end
        if (dec_bit[l] != (a[l] <= 0)) begin
          failures++;
          $display("lane %0d: bit %0d for %0d", l, dec_bit[l], a[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
