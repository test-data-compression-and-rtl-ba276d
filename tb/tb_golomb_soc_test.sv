// End-to-end test of golomb_soc_test at its default size: four cores,
// group size 4, 250-cell chains. tb_soc_harness builds the composite code,
// plays the tester and the cores, and checks every applied pattern, the
// channel timing and that each mechanism occurred.
module tb_golomb_soc_test;

  localparam int unsigned M = 4, LEN = 250, CAP = 250;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, data_in, v_in, clk_stop, done;
  logic [M-1:0][LEN-1:0] core_cells;
  logic [M-1:0][CAP-1:0] core_resp;
  logic [M-1:0] capture, scan_out, diff_bit, diff_valid;
  logic [$clog2(M)-1:0] sel;
  int checks, failures;

  golomb_soc_test dut (.*);

  tb_soc_harness #(.M(M), .LEN(LEN), .CAP(CAP), .NPAT(4), .PCT(6), .SEED(7)) h (.*);

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
