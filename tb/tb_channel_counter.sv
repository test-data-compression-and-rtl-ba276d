// Self-checking test of channel_counter for M = 4 (default) and M = 8:
// reset value M-1, counting modulo M, holding while stop is high.
module tb_channel_counter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, stop;
  logic [1:0] sel4;
  logic [2:0] sel8;

  channel_counter          dut4 (.clk, .rst_n, .stop, .sel(sel4));
  channel_counter #(.M(8)) dut8 (.clk, .rst_n, .stop, .sel(sel8));

  int checks = 0, failures = 0, wraps = 0;
  int r4, r8;

  initial begin
    rst_n = 1'b0; stop = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    r4 = 3; r8 = 7;
    checks += 2;
    if (sel4 != 2'd3 || sel8 != 3'd7) failures++;
    for (int cyc = 0; cyc < 500; cyc++) begin
      stop = ($urandom % 3 == 0);
      @(posedge clk); #1;
      if (!stop) begin
        r4 = (r4 + 1) % 4;
        r8 = (r8 + 1) % 8;
        if (r4 == 0) wraps++;
      end
      checks += 2;
      if (sel4 != 2'(r4)) begin failures++; $display("M=4: sel %0d, expected %0d", sel4, r4); end
      if (sel8 != 3'(r8)) begin failures++; $display("M=8: sel %0d, expected %0d", sel8, r8); end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
