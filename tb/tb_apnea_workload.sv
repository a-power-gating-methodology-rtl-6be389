// tb_apnea_workload: the two synthetic packet mixes of the evaluation at low,
// medium and high load, on four copies of the design run in parallel:
// T_ON = 1, 2 and 4 cycles with 4-flit buffers, and T_ON = 2 with 8-flit
// buffers. For each run it prints the share of buffer-cycles spent OFF,
// waking, ON and going to sleep, and the average packet latency.
// Checks: packets intact and all delivered; at low load most buffer-cycles
// are OFF; more load never gives more OFF time; a longer wake-up costs at
// most a few cycles of average latency at low load.
module tb_apnea_workload;
  import apnea_pkg::*;
  localparam int NCFG = 4;
  localparam int unsigned RUN = 6000;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  int unsigned rate = 0;
  bit mode = 0;
  longint unsigned n_pkts [NCFG], lat_sum [NCFG], st_cyc [NCFG][4];
  int unsigned n_fail [NCFG], n_pend [NCFG];
  int checks = 0, failures = 0;

  tb_wl_harness #(.T_ON(1), .BUF_DEPTH(4)) h0 (.clk, .rst_n, .clear, .rate, .mode, .n_pkts(n_pkts[0]), .lat_sum(lat_sum[0]), .st_cyc(st_cyc[0]), .n_fail(n_fail[0]), .n_pend(n_pend[0]));
  tb_wl_harness #(.T_ON(2), .BUF_DEPTH(4)) h1 (.clk, .rst_n, .clear, .rate, .mode, .n_pkts(n_pkts[1]), .lat_sum(lat_sum[1]), .st_cyc(st_cyc[1]), .n_fail(n_fail[1]), .n_pend(n_pend[1]));
  tb_wl_harness #(.T_ON(4), .BUF_DEPTH(4)) h2 (.clk, .rst_n, .clear, .rate, .mode, .n_pkts(n_pkts[2]), .lat_sum(lat_sum[2]), .st_cyc(st_cyc[2]), .n_fail(n_fail[2]), .n_pend(n_pend[2]));
  tb_wl_harness #(.T_ON(2), .BUF_DEPTH(8)) h3 (.clk, .rst_n, .clear, .rate, .mode, .n_pkts(n_pkts[3]), .lat_sum(lat_sum[3]), .st_cyc(st_cyc[3]), .n_fail(n_fail[3]), .n_pend(n_pend[3]));

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  real off_frac [2][3][NCFG], lat [2][3][NCFG];
  int unsigned rates [3] = '{20, 120, 500};
  string names [NCFG] = '{"T_ON=1 depth 4", "T_ON=2 depth 4", "T_ON=4 depth 4", "T_ON=2 depth 8"};

  initial begin
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < 3; r++) begin
        rst_n = 0; mode = m; rate = 0;
        repeat (3) @(posedge clk);
        rst_n = 1;
        repeat (20) @(posedge clk);
        rate = rates[r]; clear = 1; @(posedge clk); clear = 0;
        repeat (RUN) @(posedge clk);
        rate = 0;
        repeat (100) @(posedge clk);
        for (int c = 0; c < NCFG; c++) begin
          longint unsigned tot;
          tot = st_cyc[c][0] + st_cyc[c][1] + st_cyc[c][2] + st_cyc[c][3];
          off_frac[m][r][c] = real'(st_cyc[c][0]) / real'(tot);
          lat[m][r][c] = (n_pkts[c] != 0) ? real'(lat_sum[c]) / real'(n_pkts[c]) : 0.0;
          $display("%s rate %0d/1000 %-16s pkts %6d  OFF %5.1f%%  OFF->ON %4.1f%%  ON %5.1f%%  ON->OFF %4.1f%%  latency %5.2f",
                   m ? "1+3-flit" : "1-flit  ", rates[r], names[c], n_pkts[c], 100.0 * off_frac[m][r][c],
                   100.0 * real'(st_cyc[c][1]) / real'(tot), 100.0 * real'(st_cyc[c][2]) / real'(tot),
                   100.0 * real'(st_cyc[c][3]) / real'(tot), lat[m][r][c]);
          check(n_fail[c] == 0, $sformatf("%s packet integrity", names[c]));
          check(n_pend[c] == 0 && n_pkts[c] > 0, $sformatf("%s all packets delivered", names[c]));
        end
      end
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < NCFG; c++) begin
        check(off_frac[m][0][c] > 0.5, $sformatf("%s mostly OFF at low load", names[c]));
        check(off_frac[m][0][c] >= off_frac[m][1][c] && off_frac[m][1][c] >= off_frac[m][2][c],
              $sformatf("%s OFF time falls with load", names[c]));
        check(lat[m][0][c] < lat[m][0][0] + 4.0, $sformatf("%s low-load latency", names[c]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
