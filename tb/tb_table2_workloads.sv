// Single-chain workloads shaped like the benchmark rows of the tester
// frequency comparison: for each circuit the group size m, the chain length
// and pattern count, and the density of ones in the difference stream
// (r over the stream size) are matched; the test data itself is random,
// made with the stand-in core. Each row runs through core_decompressor via
// tb_decomp_harness, which checks every pattern and that decoding takes
//   T_max = m n_c - r (m log2 m - 1)
// cycles plus one per capture (the tail is always padded to m cycles, so
// the maximum is always reached). The testbench then prints the tester
// frequency ratio pn / (T_max / m) for the ATPG-compacted size pn of the
// same row, next to the published ratio.
//
// Row           m   cells  patterns  ones %  (cells, patterns: assumed)
// s9234         4    250     159      12.9
// s15850        8    684     126       6.4
// s13207       32    790     236       2.7
// s38417        4   1742      99      11.0
// s38584        8   1730     136       7.1
module tb_table2_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int ROWS = 5;
  logic [ROWS-1:0] done;
  int chk[ROWS], fail[ROWS], nc[ROWS], ro[ROWS], cyc[ROWS];
  int checks = 0, failures = 0;

  tb_decomp_harness #(.M(4),  .LEN(250),  .CAP(250),  .NPAT(159), .PCT(13), .SEED(31)) s9234 (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .code_bits(nc[0]), .diff_ones(ro[0]), .cycles(cyc[0]));
  tb_decomp_harness #(.M(8),  .LEN(684),  .CAP(684),  .NPAT(126), .PCT(6),  .SEED(32)) s15850 (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .code_bits(nc[1]), .diff_ones(ro[1]), .cycles(cyc[1]));
  tb_decomp_harness #(.M(32), .LEN(790),  .CAP(790),  .NPAT(236), .PCT(3),  .SEED(33)) s13207 (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .code_bits(nc[2]), .diff_ones(ro[2]), .cycles(cyc[2]));
  tb_decomp_harness #(.M(4),  .LEN(1742), .CAP(1742), .NPAT(99),  .PCT(11), .SEED(34)) s38417 (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .code_bits(nc[3]), .diff_ones(ro[3]), .cycles(cyc[3]));
  tb_decomp_harness #(.M(8),  .LEN(1730), .CAP(1730), .NPAT(136), .PCT(7),  .SEED(35)) s38584 (.clk, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .code_bits(nc[4]), .diff_ones(ro[4]), .cycles(cyc[4]));

  initial begin
    automatic string name [ROWS] = '{"s9234", "s15850", "s13207", "s38417", "s38584"};
    automatic int    m    [ROWS] = '{4, 8, 32, 4, 8};
    automatic int    lg   [ROWS] = '{2, 3, 5, 2, 3};
    automatic int    npat [ROWS] = '{159, 126, 236, 99, 136};
    automatic int    pn   [ROWS] = '{25935, 57434, 163100, 113152, 161040};
    automatic real   pub  [ROWS] = '{1.914, 3.921, 16.768, 1.951, 3.875};
    repeat (5) @(posedge clk);
    wait (&done);
    @(posedge clk);
    for (int i = 0; i < ROWS; i++) begin
      automatic int tmax;
      checks += chk[i];
      failures += fail[i];
      tmax = m[i] * nc[i] - ro[i] * (m[i] * lg[i] - 1);
      checks++;
      if (cyc[i] != tmax + npat[i] + 1) begin
        failures++;
        $display("%s: %0d cycles, T_max + captures + reset = %0d", name[i], cyc[i], tmax + npat[i] + 1);
      end
      $display("%-7s m=%0d n_c=%0d r=%0d T_max=%0d cycles; f'ext/fext = %0.3f (published %0.3f)",
               name[i], m[i], nc[i], ro[i], tmax, real'(pn[i]) * m[i] / tmax, pub[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
