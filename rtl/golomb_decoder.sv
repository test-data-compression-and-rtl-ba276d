// Golomb decoder for one scan chain.
//
// Turns a Golomb-coded bit stream (group size M, a power of two) back into
// the run-length stream it encodes: a prefix one stands for M zeros, a zero
// marks the start of the log2(M)-bit tail, and the tail gives the remaining
// count of zeros, after which a one is produced. Hardware is an FSM plus one
// log2(M)-bit counter; two further log2(M)-bit registers hold the tail bits
// read so far and the zeros already produced in the tail.
//
// Timing, one clock per step:
//   * a prefix one takes exactly M cycles, one zero leaving per cycle,
//   * the separator zero takes one cycle and produces nothing,
//   * the tail always takes M cycles: log2(M) of them read tail bits, and
//     the last one produces the closing one. Zeros of the tail leave as soon
//     as the tail bits read so far prove they are due (at cycle i the known
//     leading bits, shifted to full weight, are a lower bound of the count),
//     which for M = 4 gives exactly the outputs of the published m = 4 state
//     diagram with its three padding states.
// Padding the tail to M cycles makes every code bit of a core arrive M
// cycles or more after the previous one, which is what the interleaving
// channel selector relies on.
//
// Interface: bit_in/bit_valid offer a code bit, bit_ready says that the
// decoder takes it this cycle (valid and ready both high). en is the request
// output of the state diagram: high when the next cycle reads a bit. A
// source may use either. hold freezes the decoder for one cycle (used while
// the scan chain captures). dout/dvalid carry the decoded bit; dvalid is the
// scan shift enable. Reset is synchronous and active low.
//
// Own choices: in the published diagram the state S2 leaves on the counter's
// done signal without an output, which would make a prefix one take M+1
// cycles; here the last of its M zeros leaves on that transition, so that
// the prefix takes the M cycles the timing analysis counts. The bit handshake
// and hold input are additions for stalling.
module golomb_decoder
  import golomb_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic bit_in,
  input  logic bit_valid,
  output logic bit_ready,
  output logic en,
  output logic dout,
  output logic dvalid
);

  localparam int unsigned N = log2m(M);
  if (M < 2 || (M & (M - 1)) != 0) begin : g_bad_m
    $error("golomb_decoder: M must be a power of two, at least 2");
  end
  typedef logic [N-1:0] cnt_t;
  localparam cnt_t LAST = cnt_t'(M - 1);   // counter value of the last prefix zero
  localparam cnt_t TAIL_END = cnt_t'(M - 2); // last tail position before DEC_END
  localparam cnt_t NBITS = cnt_t'(N);

  dec_state_e state_q, state_d;
  cnt_t cnt_q, cnt_d;        // the log2(M)-bit counter
  cnt_t tail_q, tail_d;      // tail bits read so far, right aligned
  cnt_t sent_q, sent_d;      // zeros produced in the current tail

  logic reading;
  cnt_t tail_new;
  cnt_t bound;

  always_comb begin
    reading = (state_q == DEC_READ) || (state_q == DEC_TAIL && cnt_q < NBITS);
    bit_ready = reading && !hold;

    tail_new = (tail_q << 1) | cnt_t'(bit_in);
    // Lower bound of the tail value known in this cycle.
    if (state_q == DEC_TAIL && cnt_q < NBITS)
      bound = tail_new << (NBITS - 1 - cnt_q);
    else
      bound = tail_q;

    state_d = state_q;
    cnt_d   = cnt_q;
    tail_d  = tail_q;
    sent_d  = sent_q;
    en      = 1'b0;
    dout    = 1'b0;
    dvalid  = 1'b0;

    if (!hold) begin
      unique case (state_q)
        DEC_RESET: begin
          state_d = DEC_READ;
          en      = 1'b1;
        end
        DEC_READ: begin
          en = 1'b1;
          if (bit_valid) begin
            if (bit_in) begin
              // first zero of a prefix one
              dvalid  = 1'b1;
              cnt_d   = cnt_t'(1);
              en      = 1'b0;
              state_d = DEC_PREFIX;
            end else begin
              // separator zero: the tail follows
              cnt_d   = '0;
              tail_d  = '0;
              sent_d  = '0;
              state_d = DEC_TAIL;
            end
          end
        end
        DEC_PREFIX: begin
          dvalid = 1'b1;
          if (cnt_q == LAST) begin
            cnt_d   = '0;
            en      = 1'b1;
            state_d = DEC_READ;
          end else begin
            cnt_d = cnt_q + 1'b1;
          end
        end
        DEC_TAIL: begin
          if (cnt_q < NBITS && !bit_valid) begin
            en = 1'b1;            // wait for the tail bit
          end else begin
            if (cnt_q < NBITS) tail_d = tail_new;
            if (sent_q < bound) begin
              dvalid = 1'b1;
              sent_d = sent_q + 1'b1;
            end
            en = (cnt_q + 1'b1 < NBITS);
            if (cnt_q == TAIL_END) state_d = DEC_END;
            else cnt_d = cnt_q + 1'b1;
          end
        end
        DEC_END: begin
          dout    = 1'b1;
          dvalid  = 1'b1;
          cnt_d   = '0;
          en      = 1'b1;
          state_d = DEC_READ;
        end
        default: state_d = DEC_RESET;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= DEC_RESET;
      cnt_q   <= '0;
      tail_q  <= '0;
      sent_q  <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      tail_q  <= tail_d;
      sent_q  <= sent_d;
    end
  end

  // The tail must have produced all its zeros before the closing one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == DEC_END && !hold) |-> (sent_q == tail_q))
    else $error("golomb_decoder: tail zeros not all produced");

endmodule
