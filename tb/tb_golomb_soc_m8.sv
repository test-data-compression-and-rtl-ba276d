// End-to-end test of golomb_soc_test with 8 cores and group size 8,
// 20-cell chains of which 12 capture. tb_soc_harness builds the
// composite code, plays the tester and the cores, and checks every decoded
// bit, every applied pattern, the channel timing and that each mechanism
// occurred.
module tb_golomb_soc_m8;

  localparam int unsigned M = 8, LEN = 20, CAP = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, data_in, v_in, clk_stop, done;
  logic [M-1:0][LEN-1:0] core_cells;
  logic [M-1:0][CAP-1:0] core_resp;
  logic [M-1:0] capture, scan_out, diff_bit, diff_valid;
  logic [$clog2(M)-1:0] sel;
  int checks, failures;

  golomb_soc_test #(.M(M), .LEN(LEN), .CAP(CAP)) dut (.*);

  tb_soc_harness #(.M(M), .LEN(LEN), .CAP(CAP), .NPAT(6), .PCT(8), .SEED(28)) h (.*);

  initial begin
    repeat (5) @(posedge clk);
    wait (done);
    @(posedge clk);
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
