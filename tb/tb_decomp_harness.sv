// Drives one core_decompressor (group size M, chain of LEN cells of which
// CAP capture) with the reference-encoded difference stream of NPAT random
// patterns, and a stand-in core. The code source uses valid/ready; stall is
// raised at random. At every capture the chain must hold the next expected
// pattern t_i; the decoded difference stream is checked bit by bit. Without
// stalls, the cycles up to the last decoded bit are one reset cycle, M per
// prefix one, 1 + M per separator and tail, and one per capture.
module tb_decomp_harness
  import tb_golomb_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter int unsigned LEN  = 16,
  parameter int unsigned CAP  = 10,
  parameter int unsigned NPAT = 20,
  parameter int unsigned PCT  = 10,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   code_bits,
  output int   diff_ones,
  output int   cycles
);

  initial begin
    done = 1'b0; checks = 0; failures = 0;
  end

  logic rst_n = 1'b0;
  logic stall = 1'b0;
  logic bit_in, bit_valid, bit_ready, en, capture_req, scan_out, diff_bit, diff_valid;
  logic [CAP-1:0] resp;
  logic [LEN-1:0] cells;

  core_decompressor #(.M(M), .LEN(LEN), .CAP(CAP)) dut (.*);
  tb_core_model #(.LEN(LEN), .CAP(CAP)) u_core (.cells, .resp);

  bitq_t stream, pats, code;
  int unsigned cpos, dpos, npat, busy, cyc_expect, dlen;

  initial begin
    int unsigned s;
    s = $urandom(SEED);
    make_patterns(LEN, CAP, NPAT, PCT, stream, pats);
    code = golomb_encode(stream, M);
    dlen = stream.size() + (stream[stream.size() - 1] ? 0 : 1);
    code_bits = code.size();
    diff_ones = 0;
    foreach (stream[k]) diff_ones += stream[k];
    if (!stream[stream.size() - 1]) diff_ones++;
    cyc_expect = 1 + NPAT;
    for (int k = 0; k < code.size(); ) begin
      if (code[k]) begin cyc_expect += M; k++; end
      else begin cyc_expect += 1 + M; k += clog2u(M) + 1; end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  assign bit_valid = rst_n && (cpos < code.size());
  assign bit_in    = (cpos < code.size()) ? code[cpos] : 1'b0;

  bit last_seen;
  int unsigned caps;

  always @(posedge clk) begin
    if (!rst_n) begin
      cpos <= 0; dpos <= 0; npat <= 0; busy <= 0;
      last_seen = 1'b0; caps = 0;
    end else if (!done) begin
      stall <= ($urandom % 12 == 0);
      // unstalled cycles, and capture cycles, which hold the decoder anyway
      if (!stall || capture_req) busy <= busy + 1;
      if (bit_valid && bit_ready) cpos <= cpos + 1;
      if (diff_valid) begin
        checks++;
        if (dpos < stream.size() && diff_bit != stream[dpos]) begin
          failures++;
          $display("LEN=%0d: difference bit %0d is %b", LEN, dpos, diff_bit);
        end
        dpos <= dpos + 1;
        if (dpos + 1 == dlen) last_seen = 1'b1;
      end
      if (capture_req) begin
        checks++;
        for (int unsigned j = 0; j < LEN; j++)
          if (cells[j] != pats[npat * LEN + j]) begin
            failures++;
            $display("LEN=%0d: pattern %0d cell %0d is %b", LEN, npat, j, cells[j]);
            break;
          end
        npat <= npat + 1;
        caps++;
      end
      // all patterns applied and the whole code decoded
      if (last_seen && caps == NPAT) begin
        checks++;
        if (busy + 1 != cyc_expect) begin
          failures++;
          $display("LEN=%0d: %0d unstalled cycles, expected %0d", LEN, busy + 1, cyc_expect);
        end
        cycles = busy + 1;
        done <= 1'b1;
      end
    end
  end

endmodule
