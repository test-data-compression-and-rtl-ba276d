// Self-checking test of core_decompressor: a short chain in which fewer
// cells capture than the chain holds (M = 4), the same with M = 8, and the
// default size (M = 4, 250 cells, all capturing), each through
// tb_decomp_harness with random patterns and stalls.
module tb_core_decompressor;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] done;
  int chk[3], fail[3];
  int checks = 0, failures = 0;

  tb_decomp_harness #(.M(4), .LEN(16), .CAP(10), .NPAT(40), .SEED(3)) h0 (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .code_bits(), .diff_ones(), .cycles());
  tb_decomp_harness #(.M(8), .LEN(24), .CAP(24), .NPAT(30), .PCT(5), .SEED(4)) h1 (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .code_bits(), .diff_ones(), .cycles());
  tb_decomp_harness #(.M(4), .LEN(250), .CAP(250), .NPAT(6), .PCT(8), .SEED(5)) h2 (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .code_bits(), .diff_ones(), .cycles());

  initial begin
    repeat (5) @(posedge clk);
    wait (&done);
    @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
