// i-bit channel counter of the SOC channel selector, i = log2(M).
//
// Its value selects the demultiplexer output, i.e. the core whose decoder
// receives the bit the selector FSM puts out. It counts modulo M on every
// clock edge at which stop is low; stop is the FSM's clk_stop (together with
// a scan-capture stall). The document gates the counter's clock with
// clk_stop; here the same effect is a clock enable in a single clock
// domain. Reset (synchronous, active low) loads M-1, so that the first bit
// of T_C, which the FSM puts out one clock after reset together with the
// counter's first step, goes to core 0. The reset value is this design's
// choice.
module channel_counter #(
  parameter int unsigned M = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stop,
  output logic [$clog2(M)-1:0]  sel
);

  if (M < 2 || (M & (M - 1)) != 0) begin : g_bad_m
    $error("channel_counter: M must be a power of two, at least 2");
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     sel <= '1;
    else if (!stop) sel <= sel + 1'b1;
  end

endmodule
