// Self-checking test of golomb_decoder at group sizes 4 (the default), 2,
// 8, 32 and 2048 (11-bit counters, the largest group size evaluated), each
// fed a random stream by tb_decoder_harness, plus the
// published m = 4 code table: run lengths 0..11 must decode exactly.
module tb_golomb_decoder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] done;
  int chk[5], fail[5], tmax[5], tzero[5];

  tb_decoder_harness #(.M(4),  .SEED(11)) h4  (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .tails_max(tmax[0]), .tails_zero(tzero[0]));
  tb_decoder_harness #(.M(2),  .SEED(12)) h2  (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .tails_max(tmax[1]), .tails_zero(tzero[1]));
  tb_decoder_harness #(.M(8),  .SEED(13)) h8  (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .tails_max(tmax[2]), .tails_zero(tzero[2]));
  tb_decoder_harness #(.M(32), .SEED(14)) h32 (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .tails_max(tmax[3]), .tails_zero(tzero[3]));
  tb_decoder_harness #(.M(2048), .BITS(40000), .SEED(15)) h2048 (.clk, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .tails_max(tmax[4]), .tails_zero(tzero[4]));

  // Code table for m = 4: run length L -> codeword.
  int checks = 0, failures = 0;
  initial begin
    automatic string cw [12] = '{"000","001","010","011","1000","1001","1010","1011",
                       "11000","11001","11010","11011"};
    for (int l = 0; l < 12; l++) begin
      automatic tb_golomb_pkg::bitq_t d, c;
      automatic string s = "";
      repeat (l) d.push_back(1'b0);
      d.push_back(1'b1);
      c = tb_golomb_pkg::golomb_encode(d, 4);
      foreach (c[k]) s = {s, c[k] ? "1" : "0"};
      checks++;
      if (s != cw[l]) begin
        failures++;
        $display("reference code for run %0d is %s", l, s);
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    wait (&done);
    @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      checks += chk[i];
      failures += fail[i];
      checks++;
      if (tmax[i] == 0 || tzero[i] == 0) begin
        failures++;
        $display("harness %0d: a tail value never occurred", i);
      end
    end
    $display("decoding finished at time %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: decoding did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
