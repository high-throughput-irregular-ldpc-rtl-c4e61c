// tb_conn_network: checks the fixed message paths of a layer. For every lane
// the testbench finds the successor layer on its own (the layer of the same
// block column that meets the variable soonest after this one, by stepping
// the delay 1, 2, ... cycles) and checks the destination address
// (row + s_own - s_successor) mod 96. It also checks the example path of the
// first block column (layers 4 -> 12 -> 9 -> 4, counting from 1) and its
// 18-cycle address offset from layer 4 to layer 12.
module tb_conn_network;
  import ldpc_pkg::*;
  localparam int L = 3;
  localparam int D = row_deg(L);
  logic in_valid = 0;
  row_t row = '0;
  app_t [D-1:0] app_new = '0;
  logic [D-1:0] wr_en;
  row_t [D-1:0] wr_addr;
  app_t [D-1:0] wr_data;
  int checks = 0, failures = 0;

  conn_network #(.LAYER(L)) dut (.*);

  function automatic int next_layer(int i, int j);
    int ei = (HB[i][j] + ROW_START[i]) % Z;
    for (int dly = 1; dly < Z; dly++)
      for (int k = 0; k < MB; k++)
        if (k != i && HB[k][j] >= 0 && (HB[k][j] + ROW_START[k]) % Z == (ei - dly + Z) % Z)
          return k;
    return -1;
  endfunction

  initial begin
    int cols [MAXD];
    automatic int d = 0;
    for (int j = 0; j < NB; j++) if (HB[L][j] >= 0) cols[d++] = j;
    // example path of block column 0
    checks += 3;
    if (next_layer(3, 0) != 11) failures++;
    if (next_layer(11, 0) != 8) failures++;
    if (next_layer(8, 0) != 3) failures++;
    for (int t = 0; t < 500; t++) begin
      automatic int r = $urandom % Z;
      automatic bit v = 1'($urandom);
      int a [MAXD];
      row = row_t'(r);
      in_valid = v;
      for (int l = 0; l < D; l++) begin
        a[l] = int'($urandom % 255) - 127;
        app_new[l] = app_t'(a[l]);
      end
      #1;
      for (int l = 0; l < D; l++) begin
        automatic int k = next_layer(L, cols[l]);
        automatic int ea = (r + HB[L][cols[l]] - HB[k][cols[l]] + 2 * Z) % Z;
        checks += 3;
        if (wr_en[l] != v) failures++;
        if (int'(wr_addr[l]) != ea) begin
          failures++;
          $display("lane %0d row %0d: addr %0d expected %0d", l, r, wr_addr[l], ea);
        end
        if (int'(wr_data[l]) != a[l]) failures++;
        if (l == 0) begin
          checks++;
          if (int'(wr_addr[0]) != (r + 18) % Z) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
