// Internal scan chain of a core under test, with response capture.
//
// LEN mux-D scan cells. cells[0] sits at the scan input and cells[LEN-1]
// drives scan_out, so the first bit shifted in after a capture reaches
// cells[LEN-1] after LEN shifts. On capture the first CAP cells, those at
// the scan-in end, load the core's responses resp; the other LEN-CAP cells
// keep the pattern bit they hold. This models a core with more inputs
// driven by the chain than outputs feeding it (CAP < LEN); with CAP = LEN
// every cell captures, which also covers a core whose chain is set by its
// outputs and has more cells than core inputs.
//
// Timing: one shift per clock with shift_en, one capture per clock with
// capture; capture and shift in the same clock is a protocol error.
// cells drives the core inputs. Reset (synchronous, active low) clears the
// chain, the all-zero start state the coding assumes.
//
// The document places the captured outputs at the start of the chain; the
// cell numbering and the mux-D cell are this design's choices.
module scan_chain #(
  parameter int unsigned LEN = 250,
  parameter int unsigned CAP = 250
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           scan_in,
  input  logic           capture,
  input  logic [CAP-1:0] resp,
  output logic [LEN-1:0] cells,
  output logic           scan_out
);

  if (CAP < 1 || CAP > LEN || LEN < 2) begin : g_bad_size
    $error("scan_chain: need 2 <= LEN and 1 <= CAP <= LEN");
  end

  logic [LEN-1:0] cap_val;

  always_comb begin
    cap_val = cells;
    cap_val[CAP-1:0] = resp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        cells <= '0;
    else if (capture)  cells <= cap_val;
    else if (shift_en) cells <= {cells[LEN-2:0], scan_in};
  end

  assign scan_out = cells[LEN-1];

  assert property (@(posedge clk) !(rst_n && capture && shift_en))
    else $error("scan_chain: capture and shift in the same cycle");

endmodule
