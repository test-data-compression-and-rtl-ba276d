// The four-pattern example of deriving a difference stream from responses,
// run through core_decompressor (m = 4, 4-cell chain).
//
// Difference vectors 1000, 0100, 1010, 0000 with core responses
// r1 = 0000, r2 = 0100, r3 = 0011 must apply the patterns
// t1 = 1000, t2 = 0100, t3 = 1110, t4 = 0011. A pattern is written in
// shift order: its first character is shifted in first and ends in the
// cell at the scan-out end. The core here is a lookup of those responses.
module tb_fig3_example;
  import tb_golomb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, bit_in, bit_valid, bit_ready, en, capture_req, scan_out, diff_bit, diff_valid;
  logic [3:0] resp, cells;

  core_decompressor #(.M(4), .LEN(4), .CAP(4)) dut (.clk, .rst_n, .stall(1'b0), .bit_in, .bit_valid,
    .bit_ready, .en, .capture_req, .resp, .cells, .scan_out, .diff_bit, .diff_valid);

  // string "abcd" in shift order -> cells {a,b,c,d} with a in cell 3
  function automatic logic [3:0] pat(string s);
    logic [3:0] v;
    for (int k = 0; k < 4; k++) v[3 - k] = (s[k] == "1");
    return v;
  endfunction

  always_comb begin
    if (cells == pat("1000"))      resp = pat("0000");
    else if (cells == pat("0100")) resp = pat("0100");
    else if (cells == pat("1110")) resp = pat("0011");
    else                           resp = pat("0000");
  end

  bitq_t d, code;
  int unsigned cpos, ncap;
  int checks = 0, failures = 0;
  string tp [4] = '{"1000", "0100", "1110", "0011"};

  initial begin
    automatic string ds [4] = '{"1000", "0100", "1010", "0000"};
    foreach (ds[i]) for (int k = 0; k < 4; k++) d.push_back(ds[i][k] == "1");
    code = golomb_encode(d, 4);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
  end

  assign bit_valid = rst_n && cpos < code.size();
  assign bit_in = (cpos < code.size()) ? code[cpos] : 1'b1;

  always @(posedge clk) begin
    if (!rst_n) begin
      cpos <= 0; ncap = 0;
    end else begin
      if (bit_valid && bit_ready) cpos <= cpos + 1;
      if (capture_req && ncap < 4) begin
        checks++;
        if (cells != pat(tp[ncap])) begin
          failures++;
          $display("pattern %0d: cells %b, expected %s", ncap + 1, cells, tp[ncap]);
        end
        ncap++;
        if (ncap == 4) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
