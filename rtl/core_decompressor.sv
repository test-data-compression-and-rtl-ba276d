// Decompression for one core: Golomb decoder, XOR, internal scan chain.
//
// The decoder rebuilds the difference stream; each decoded bit is XORed
// with the bit leaving the scan chain and shifted back in. After LEN shifts
// the chain therefore holds d_i XOR r_(i-1), the difference vector XOR the
// captured response of the previous pattern, which is the test pattern t_i
// (after reset the chain is all zero, so the first pattern is d_1). A shift
// counter then raises capture_req for one cycle: the chain captures the
// core's response and the decoder is held, so no bit is lost. The next
// difference vector starts with the following decoded bit.
//
// Interface: bit_in/bit_valid/bit_ready and en as in golomb_decoder. stall
// holds the decoder from outside (another core capturing, when several
// cores run in lock step). capture_req is high in the capture cycle; cells
// drives the core inputs and resp takes its outputs. diff_bit/diff_valid
// show the decoded difference stream.
//
// The decoder, XOR and reuse of the internal chain follow the document; the
// shift counter, the one-cycle capture with the decoder held and the stall
// input are this design's choices.
module core_decompressor #(
  parameter int unsigned M   = 4,
  parameter int unsigned LEN = 250,
  parameter int unsigned CAP = 250
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           stall,
  input  logic           bit_in,
  input  logic           bit_valid,
  output logic           bit_ready,
  output logic           en,
  output logic           capture_req,
  input  logic [CAP-1:0] resp,
  output logic [LEN-1:0] cells,
  output logic           scan_out,
  output logic           diff_bit,
  output logic           diff_valid
);

  localparam int unsigned CW = $clog2(LEN + 1);
  typedef logic [CW-1:0] count_t;

  logic   dec_hold;
  logic   scan_in;
  count_t shifted_q;

  assign dec_hold = stall || capture_req;

  golomb_decoder #(.M(M)) u_decoder (
    .clk       (clk),
    .rst_n     (rst_n),
    .hold      (dec_hold),
    .bit_in    (bit_in),
    .bit_valid (bit_valid),
    .bit_ready (bit_ready),
    .en        (en),
    .dout      (diff_bit),
    .dvalid    (diff_valid)
  );

  // The pattern is the difference bit XOR the response leaving the chain.
  assign scan_in = diff_bit ^ scan_out;

  scan_chain #(.LEN(LEN), .CAP(CAP)) u_chain (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (diff_valid),
    .scan_in  (scan_in),
    .capture  (capture_req),
    .resp     (resp),
    .cells    (cells),
    .scan_out (scan_out)
  );

  // Shift counter: a full chain is captured in the following cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shifted_q   <= '0;
      capture_req <= 1'b0;
    end else if (capture_req) begin
      shifted_q   <= '0;
      capture_req <= 1'b0;
    end else if (diff_valid) begin
      if (shifted_q == count_t'(LEN - 1)) begin
        shifted_q   <= '0;
        capture_req <= 1'b1;
      end else begin
        shifted_q <= shifted_q + 1'b1;
      end
    end
  end

endmodule
