// Self-checking test of channel_demux (M = 4): every select value with
// every data/valid combination; only the selected output may carry them.
module tb_channel_demux;

  logic data, valid;
  logic [1:0] sel;
  logic [3:0] out_data, out_valid;

  channel_demux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 4; v++) begin
        sel = 2'(s); data = v[0]; valid = v[1];
        #1;
        for (int c = 0; c < 4; c++) begin
          checks += 2;
          if (out_data[c] != (c == s && v[0] == 1)) failures++;
          if (out_valid[c] != (c == s && v[1] == 1)) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
