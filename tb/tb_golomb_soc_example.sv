// Four-core example of the interleaving analysis, run on golomb_soc_test
// at its default size (m = 4, 250-cell chains).
//
// The cores' codes have n_C = 40, 60, 80 and 100 bits with r = 4, 6, 8 and
// 10 ones in their difference streams: every run of zeros is 7*4 + v long
// (seven prefix ones, tail value v), so core j has 7*r_j prefix ones and
// n_C = 7*r_j + 3*r_j bits. The testbench checks these sizes, streams the
// interleaved code through the design with stand-in cores, checks every
// decoded bit, and compares the cycles taken with
//   exact count : one per prefix or filler one, 1 + m per separator and
//                 tail, one per capture stall;
//   T_I  = (n_C,max - r_max(1 + log2 m)) m + (1 + m) R      (interleaved)
//   T_NI = m |T_C| - R (m log2 m - 1)                        (one by one)
// T_NI - T_I must be 504 cycles, and the design must beat T_NI.
module tb_golomb_soc_example;
  import tb_golomb_pkg::*;

  localparam int unsigned M = 4, LEN = 250, CAP = 250;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, data_in, v_in, clk_stop;
  logic [M-1:0][LEN-1:0] core_cells;
  logic [M-1:0][CAP-1:0] core_resp;
  logic [M-1:0] capture, scan_out, diff_bit, diff_valid;
  logic [$clog2(M)-1:0] sel;

  golomb_soc_test dut (.*);

  for (genvar c = 0; c < M; c++) begin : g_core
    tb_core_model #(.LEN(LEN), .CAP(CAP)) u_core (.cells(core_cells[c]), .resp(core_resp[c]));
  end

  int checks = 0, failures = 0;
  bitq_t streams [M];
  bitq_t codes [];
  bitq_t tc;
  int unsigned dpos [M];
  int unsigned idx, cycles, stalls, ones, seps, fillers, t_i, t_ni, rsum, tc_len;
  bit done = 1'b0;

  initial begin
    automatic int unsigned nc [M] = '{40, 60, 80, 100};
    automatic int unsigned r  [M] = '{4, 6, 8, 10};
    codes = new[M];
    rsum = 0; tc_len = 0;
    for (int c = 0; c < int'(M); c++) begin
      for (int unsigned k = 0; k < r[c]; k++) begin
        repeat (7 * M + (k + c) % M) streams[c].push_back(1'b0);
        streams[c].push_back(1'b1);
      end
      codes[c] = golomb_encode(streams[c], M);
      checks++;
      if (codes[c].size() != nc[c]) begin failures++; $display("core %0d code has %0d bits", c, codes[c].size()); end
      rsum += r[c];
      tc_len += nc[c];
      dpos[c] = 0;
    end
    tc = interleave(codes, M, fillers);
    ones = 0; seps = 0;
    for (int k = 0; k < tc.size(); ) if (tc[k]) begin ones++; k++; end else begin seps++; k += 3; end
    t_i  = (100 - 10 * 3) * M + (1 + M) * rsum;
    t_ni = M * tc_len - rsum * (M * 2 - 1);
    checks++;
    if (t_ni - t_i != 504) begin failures++; $display("T_NI - T_I = %0d", t_ni - t_i); end
    rst_n = 1'b0; idx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  assign data_in = (idx < tc.size()) ? tc[idx] : 1'b1;

  always @(posedge clk) begin
    if (!rst_n) begin
      cycles = 0; stalls = 0;
    end else if (!done) begin
      if (|capture) stalls++;
      else if (idx < tc.size()) cycles++;
      for (int c = 0; c < int'(M); c++) if (diff_valid[c]) begin
        if (dpos[c] < streams[c].size()) begin
          checks++;
          if (diff_bit[c] != streams[c][dpos[c]]) begin failures++; $display("core %0d bit %0d wrong", c, dpos[c]); end
        end
        dpos[c]++;
      end
      if (v_in) idx++;
      if (idx >= tc.size() && !clk_stop) begin
        done = 1'b1;
        for (int c = 0; c < int'(M); c++) begin
          checks++;
          if (dpos[c] < streams[c].size()) begin failures++; $display("core %0d: only %0d bits decoded", c, dpos[c]); end
        end
        checks += 3;
        if (cycles != ones + (1 + M) * seps) begin failures++; $display("%0d cycles, expected %0d", cycles, ones + (1 + M) * seps); end
        if (stalls == 0) begin failures++; $display("no capture stall"); end
        if (cycles + stalls >= t_ni) begin failures++; $display("not faster than testing the cores one by one"); end
        $display("interleaved: %0d cycles + %0d capture stalls; formula T_I = %0d, T_NI = %0d, fillers %0d",
                 cycles, stalls, t_i, t_ni, fillers);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
