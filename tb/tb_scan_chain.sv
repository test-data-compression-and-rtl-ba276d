// Self-checking test of scan_chain: a 12-cell chain whose first 5 cells
// capture, and a default-size chain, both driven with random shifts and
// captures and compared every cycle with a bit-array reference model.
module tb_scan_chain;

  localparam int LEN = 12, CAP = 5;
  localparam int DLEN = 250, DCAP = 250;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, shift_en, scan_in, capture;
  logic [CAP-1:0] resp;
  logic [LEN-1:0] cells;
  logic scan_out;
  logic [DCAP-1:0] dresp;
  logic [DLEN-1:0] dcells;
  logic dscan_out;

  scan_chain #(.LEN(LEN), .CAP(CAP)) dut (.*);
  scan_chain dut_def (.clk, .rst_n, .shift_en, .scan_in, .capture,
                      .resp(dresp), .cells(dcells), .scan_out(dscan_out));

  logic [LEN-1:0] ref_cells;
  logic [DLEN-1:0] ref_dcells;
  int checks = 0, failures = 0, n_cap = 0, n_shift = 0;

  initial begin
    rst_n = 1'b0; shift_en = 1'b0; capture = 1'b0; scan_in = 1'b0;
    resp = '0; dresp = '0;
    ref_cells = '0; ref_dcells = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      capture  = ($urandom % 7 == 0);
      shift_en = !capture && ($urandom % 3 != 0);
      scan_in  = 1'($urandom);
      resp     = CAP'($urandom);
      for (int w = 0; w < DCAP; w += 32) dresp[w +: 32] = $urandom;
      @(posedge clk);
      if (capture) begin
        ref_cells[CAP-1:0] = resp;
        ref_dcells = dresp;
        n_cap++;
      end else if (shift_en) begin
        ref_cells = {ref_cells[LEN-2:0], scan_in};
        ref_dcells = {ref_dcells[DLEN-2:0], scan_in};
        n_shift++;
      end
      #1;
      checks += 3;
      if (cells !== ref_cells) begin failures++; $display("cycle %0d: cells %h, expected %h", cyc, cells, ref_cells); end
      if (scan_out !== ref_cells[LEN-1]) failures++;
      if (dcells !== ref_dcells) begin failures++; $display("cycle %0d: default chain differs", cyc); end
    end
    checks++;
    if (n_cap == 0 || n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
