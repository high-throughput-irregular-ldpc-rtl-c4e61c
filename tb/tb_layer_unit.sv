// tb_layer_unit: one layer (layer 2, index 1, seven block columns) with its
// APP memories modelled in the testbench (one-cycle read of random values).
// After clearing the CTV memory the layer runs two full sweeps; the testbench
// keeps its own CTV values per row and computes, for the read issued in cycle
// t, the messages expected in cycle t + 4: q = sat(Lambda - r_old), min-sum
// with alpha = 0.75, Lambda_new = sat(q + r_new), the destination address in
// the successor layer's memory, the variable index and the hard decision.
// The second sweep only matches if the CTV words of the first were stored.
// Finally a flush must cancel every row in flight.
module tb_layer_unit;
  import ldpc_pkg::*;
  localparam int L = 1;
  localparam int D = row_deg(L);
  logic clk = 0, rst_n = 0, run = 0, flush = 0, clr_en = 0;
  row_t phase = '0, clr_addr = '0;
  row_t rd_addr;
  app_t [D-1:0] rd_data;
  logic [D-1:0] wr_en;
  row_t [D-1:0] wr_addr;
  app_t [D-1:0] wr_data;
  logic dec_valid;
  row_t [D-1:0] dec_col;
  logic [D-1:0] dec_bit;
  int checks = 0, failures = 0;

  layer_unit #(.LAYER(L)) dut (.*);
  always #5 clk = ~clk;

  int inmem [MAXD][Z];
  int rold [Z][MAXD];
  int cols [MAXD];
  // expected results, indexed by issue cycle
  bit exp_v [400];
  int exp_addr [400][MAXD];
  int exp_app [400][MAXD];
  int exp_col [400][MAXD];

  always @(posedge clk)
    for (int l = 0; l < D; l++) rd_data[l] <= app_t'(inmem[l][rd_addr]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return (v > APP_MAX) ? APP_MAX : ((v < -APP_MAX) ? -APP_MAX : v);
  endfunction

  function automatic int next_layer(int i, int j);
    int ei = (HB[i][j] + ROW_START[i]) % Z;
    for (int dly = 1; dly < Z; dly++)
      for (int k = 0; k < MB; k++)
        if (k != i && HB[k][j] >= 0 && (HB[k][j] + ROW_START[k]) % Z == (ei - dly + Z) % Z)
          return k;
    return -1;
  endfunction

  function automatic void model_row(int t, int row);
    int q [MAXD];
    for (int l = 0; l < D; l++) q[l] = sat(inmem[l][row] - rold[row][l]);
    for (int l = 0; l < D; l++) begin
      int m = MAG_MAX;
      bit s = 0;
      int r;
      int k = next_layer(L, cols[l]);
      for (int o = 0; o < D; o++)
        if (o != l) begin
          int a = (q[o] < 0) ? -q[o] : q[o];
          if (a < m) m = a;
          s ^= (q[o] < 0);
        end
      r = s ? -((3 * m) / 4) : (3 * m) / 4;
      rold[row][l] = r;
      exp_app[t][l] = sat(q[l] + r);
      exp_addr[t][l] = (row + HB[L][cols[l]] - HB[k][cols[l]] + 2 * Z) % Z;
      exp_col[t][l] = (row + HB[L][cols[l]]) % Z;
    end
    exp_v[t] = 1;
  endfunction

  task automatic compare(int t);
    if (t < 0 || !exp_v[t]) begin
      checks++;
      if (wr_en != '0 || dec_valid) begin failures++; $display("unexpected write at %0d", t); end
      return;
    end
    checks++;
    if (wr_en != '1 || !dec_valid) begin failures++; $display("missing write for cycle %0d", t); end
    for (int l = 0; l < D; l++) begin
      checks += 4;
      if (int'(wr_data[l]) != exp_app[t][l]) begin
        failures++;
        $display("cycle %0d lane %0d: app %0d expected %0d", t, l, wr_data[l], exp_app[t][l]);
      end
      if (int'(wr_addr[l]) != exp_addr[t][l]) failures++;
      if (int'(dec_col[l]) != exp_col[t][l]) failures++;
      if (dec_bit[l] != (exp_app[t][l] <= 0)) failures++;
    end
  endtask

  initial begin
    automatic int d = 0;
    for (int j = 0; j < NB; j++) if (HB[L][j] >= 0) cols[d++] = j;
    for (int l = 0; l < D; l++)
      for (int a = 0; a < Z; a++) inmem[l][a] = int'($urandom % 121) - 60;
    for (int a = 0; a < Z; a++) for (int l = 0; l < MAXD; l++) rold[a][l] = 0;
    for (int t = 0; t < 400; t++) exp_v[t] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // clear the CTV memory
    for (int c = 0; c < Z; c++) begin
      clr_en <= 1;
      clr_addr <= row_t'(c);
      @(posedge clk);
    end
    clr_en <= 0;
    #1;
    // two sweeps
    for (int t = 0; t < 2 * Z + 8; t++) begin
      if (t < 2 * Z) begin
        run = 1;
        phase = row_t'(t % Z);
        model_row(t, (t + ROW_START[L]) % Z);
      end else begin
        run = 0;
      end
      compare(t - PIPE_LAT);
      @(posedge clk);
      #1;
    end
    // flush cancels rows in flight
    run = 1;
    phase = '0;
    @(posedge clk);
    #1;
    @(posedge clk);
    #1;
    run = 0;
    flush = 1;
    @(posedge clk);
    #1;
    flush = 0;
    for (int t = 0; t < 6; t++) begin
      checks++;
      if (wr_en != '0) begin failures++; $display("write after flush"); end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
