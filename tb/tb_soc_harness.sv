// End-to-end driver for golomb_soc_test with M cores.
//
// For every core it makes random patterns with the stand-in core logic,
// Golomb-codes their difference stream and interleaves the M codes into
// T_C (tb_golomb_pkg). Core c gets NPAT + 2*c patterns, so the cores finish
// at different times and filler ones occur. A tester model streams T_C
// (first bit from reset, next bit after every clock edge with v_in high),
// M stand-in cores answer the chains. Checks:
//   * every decoded difference bit of every core;
//   * at every capture of core c, for its first NPAT + 2*c captures, the
//     chain holds the expected pattern t_i;
//   * while T_C lasts, the unstalled cycles are one per prefix or filler
//     one and 1 + M per separator with its tail (every core shares one
//     channel, each bit one cycle); stalled cycles are the capture cycles;
//   * each mechanism occurred: prefix ones, tails (clk_stop), tails with
//     value 0 and with value M-1, counter wrap-around, filler bits, capture
//     stalls, two cores capturing in the same cycle.
module tb_soc_harness
  import tb_golomb_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter int unsigned LEN  = 250,
  parameter int unsigned CAP  = 250,
  parameter int unsigned NPAT = 4,
  parameter int unsigned PCT  = 6,
  parameter int unsigned SEED = 1
) (
  input  logic                  clk,
  output logic                  rst_n,
  output logic                  data_in,
  input  logic                  v_in,
  input  logic [M-1:0][LEN-1:0] core_cells,
  output logic [M-1:0][CAP-1:0] core_resp,
  input  logic [M-1:0]          capture,
  input  logic [M-1:0]          diff_bit,
  input  logic [M-1:0]          diff_valid,
  input  logic [$clog2(M)-1:0]  sel,
  input  logic                  clk_stop,
  output logic                  done,
  output int                    checks,
  output int                    failures
);

  localparam int unsigned N = clog2u(M);

  for (genvar c = 0; c < M; c++) begin : g_core
    tb_core_model #(.LEN(LEN), .CAP(CAP)) u_core (.cells(core_cells[c]), .resp(core_resp[c]));
  end

  bitq_t pats [M];
  bitq_t streams [M];
  int unsigned dpos [M];
  bitq_t codes [];
  bitq_t tc;
  int unsigned fillers, ones, seps, tail0, tailmax, tc_cycles, stall_cycles, total_caps;
  int unsigned idx;
  int unsigned ncap [M];
  int unsigned tails_seen, wraps, double_caps;
  logic stop_q;
  logic [$clog2(M)-1:0] sel_q;

  initial begin
    int unsigned s;
    bitq_t stream;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0;
    s = $urandom(SEED);
    codes = new[M];
    for (int c = 0; c < int'(M); c++) begin
      make_patterns(LEN, CAP, NPAT + 2 * c, PCT, stream, pats[c]);
      codes[c] = golomb_encode(stream, M);
      streams[c] = stream;
      ncap[c] = 0;
      dpos[c] = 0;
    end
    tc = interleave(codes, M, fillers);
    ones = 0; seps = 0; tail0 = 0; tailmax = 0;
    for (int k = 0; k < tc.size(); ) begin
      if (tc[k]) begin ones++; k++; end
      else begin
        automatic int unsigned v = 0;
        for (int unsigned b = 1; b <= N; b++) v = (v << 1) | tc[k + b];
        if (v == 0) tail0++;
        if (v == M - 1) tailmax++;
        seps++;
        k += N + 1;
      end
    end
    $display("T_C: %0d bits, %0d prefix or filler ones (%0d fillers), %0d tails",
             tc.size(), ones, fillers, seps);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  assign data_in = (idx < tc.size()) ? tc[idx] : 1'b1;

  function automatic bit all_done();
    for (int c = 0; c < int'(M); c++)
      if (ncap[c] < NPAT + 2 * c) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      idx = 0; tc_cycles = 0; stall_cycles = 0; total_caps = 0;
      tails_seen = 0; wraps = 0; double_caps = 0; stop_q = 1'b0; sel_q = '0;
    end else if (!done) begin
      if (|capture) begin
        stall_cycles++;
        if ($countones(capture) > 1) double_caps++;
      end else if (idx < tc.size()) tc_cycles++;
      if (clk_stop && !stop_q) tails_seen++;
      if (sel == '0 && sel_q == '1) wraps++;
      stop_q = clk_stop;
      sel_q = sel;
      // decoded difference streams, bit by bit
      for (int c = 0; c < int'(M); c++) if (diff_valid[c]) begin
        if (dpos[c] < streams[c].size()) begin
          checks++;
          if (diff_bit[c] != streams[c][dpos[c]]) begin
            failures++;
            $display("core %0d: difference bit %0d is %b", c, dpos[c], diff_bit[c]);
          end
        end
        dpos[c]++;
      end
      for (int c = 0; c < int'(M); c++) if (capture[c]) begin
        if (ncap[c] < NPAT + 2 * c) begin
          checks++;
          for (int unsigned j = 0; j < LEN; j++)
            if (core_cells[c][j] != pats[c][ncap[c] * LEN + j]) begin
              failures++;
              $display("core %0d pattern %0d: cell %0d is %b", c, ncap[c], j, core_cells[c][j]);
              break;
            end
        end
        ncap[c]++;
        total_caps++;
      end
      if (v_in) idx++;
      if (all_done() && idx >= tc.size()) begin
        done <= 1'b1;
        checks++;
        if (tc_cycles != ones + (1 + M) * seps) begin
          failures++;
          $display("T_C took %0d unstalled cycles, expected %0d", tc_cycles, ones + (1 + M) * seps);
        end
        $display("T_C: %0d unstalled cycles, %0d capture cycles", tc_cycles, stall_cycles);
        // mechanisms
        checks += 7;
        if (ones == 0)       begin failures++; $display("no prefix ones"); end
        if (tails_seen != seps) begin failures++; $display("clk_stop high %0d times for %0d tails", tails_seen, seps); end
        if (tail0 == 0 || tailmax == 0) begin failures++; $display("tail values 0 / M-1 missing"); end
        if (wraps == 0)      begin failures++; $display("counter never wrapped"); end
        if (fillers == 0)    begin failures++; $display("no filler bits"); end
        if (stall_cycles == 0) begin failures++; $display("no capture stall"); end
        if (double_caps == 0) begin failures++; $display("no simultaneous capture"); end
        $display("mechanisms: prefix ones %0d, tails %0d (value 0: %0d, value M-1: %0d), wraps %0d, fillers %0d, capture stalls %0d, simultaneous captures %0d",
                 ones, tails_seen, tail0, tailmax, wraps, fillers, stall_cycles, double_caps);
      end
    end
  end

endmodule
