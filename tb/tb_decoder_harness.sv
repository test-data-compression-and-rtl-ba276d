// Drives one golomb_decoder with group size M from a reference-encoded
// random difference stream and checks it.
//
// The source offers code bits with valid/ready; hold is raised at random.
// Checks: every decoded bit against the stream, the total number of bits,
// the request output en (a cycle after en the decoder reads, unless held)
// and the cycle count: without the held cycles, decoding takes one reset
// cycle plus M cycles per prefix one and 1 + M cycles per separator and
// tail. Reports through its output ports when done.
module tb_decoder_harness
  import tb_golomb_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter int unsigned BITS = 3000,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   tails_max,
  output int   tails_zero
);

  initial begin
    done = 1'b0; checks = 0; failures = 0;
  end

  logic rst_n = 1'b0;
  logic hold = 1'b0;
  logic bit_in, bit_valid, bit_ready, en, dout, dvalid;

  golomb_decoder #(.M(M)) dut (
    .clk, .rst_n, .hold, .bit_in, .bit_valid, .bit_ready, .en, .dout, .dvalid
  );

  bitq_t d, code;
  int unsigned cpos, opos, prefix_ones, separators, busy_cycles, held_cycles;
  logic en_q, hold_q;

  initial begin
    int unsigned seed_v;
    int unsigned run, m_tail;
    int unsigned first_runs [3];
    first_runs = '{0, M - 1, 2 * M - 1};
    seed_v = $urandom(SEED);
    // Runs of random length, some long, so that all tail values occur.
    // The stream opens with runs 0, M-1 and 2M-1, so that the extreme tail
    // values occur even for a large M.
    foreach (first_runs[i]) begin
      repeat (first_runs[i]) d.push_back(1'b0);
      d.push_back(1'b1);
    end
    tails_max = 2; tails_zero = 1;
    while (d.size() < BITS) begin
      run = ($urandom % 4 == 0) ? $urandom % (5 * M) : $urandom % M;
      repeat (run) d.push_back(1'b0);
      d.push_back(1'b1);
      if (run % M == M - 1) tails_max++;
      if (run % M == 0) tails_zero++;
    end
    code = golomb_encode(d, M);
    prefix_ones = 0; separators = 0;
    for (int k = 0; k < code.size(); ) begin
      if (code[k]) begin prefix_ones++; k++; end
      else begin separators++; k += clog2u(M) + 1; end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  assign bit_valid = rst_n && (cpos < code.size());
  assign bit_in    = (cpos < code.size()) ? code[cpos] : 1'b0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cpos <= 0; opos <= 0; busy_cycles <= 0; held_cycles <= 0;
      en_q <= 1'b0; hold_q <= 1'b1;
    end else if (!done) begin
      hold   <= ($urandom % 10 == 0);
      en_q   <= en;
      hold_q <= hold;
      if (hold) held_cycles <= held_cycles + 1;
      else busy_cycles <= busy_cycles + 1;
      if (bit_valid && bit_ready) cpos <= cpos + 1;
      // en of the previous cycle announces a read in this one
      if (!hold_q) begin
        checks++;
        if (en_q != (bit_ready || (hold && dut.reading))) begin
          failures++;
          $display("M=%0d: en=%b but ready=%b", M, en_q, bit_ready);
        end
      end
      if (dvalid) begin
        checks++;
        if (opos >= d.size() || dout != d[opos]) begin
          failures++;
          $display("M=%0d: decoded bit %0d is %b", M, opos, dout);
        end
        opos <= opos + 1;
        if (opos + 1 == d.size()) begin
          // last bit: count the cycles spent, this one included
          if (busy_cycles + 1 != 1 + M * prefix_ones + (1 + M) * separators) begin
            failures += 2;
            $display("M=%0d: %0d busy cycles, expected %0d", M, busy_cycles + 1,
                     1 + M * prefix_ones + (1 + M) * separators);
          end else checks += 2;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
