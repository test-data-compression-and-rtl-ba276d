// Interleaved Golomb test decompression for M cores over one tester channel.
//
// The tester streams the composite code T_C into the SOC channel selector,
// which deals it out to M per-core decompressors: each has its own Golomb
// decoder, XOR gate and the core's internal scan chain, which turns the
// decoded difference stream back into test patterns using the captured
// fault-free responses of the previous pattern. All M cores must use the
// same group size M.
//
// Scan capture: when a chain has received a full pattern it captures the
// core's response in the next cycle. In that cycle the selector and all
// decoders are stalled, so the fixed timing between the selector and the
// decoders (a core's prefix bits at most every M cycles, a tail in one
// burst) is kept. Two chains may capture in the same cycle. The stall is
// this design's choice; the document only asks that capture cycles of
// chains fed in parallel be synchronised.
//
// Ports: data_in/v_in to the tester (v_in high: the tester moves to its
// next bit at this clock edge). core_cells[c] drives the inputs of core c,
// core_resp[c] takes its outputs, capture[c] marks the cycle in which core
// c captures (a pattern has then been applied). scan_out, the decoded
// difference bits and the selector's sel and clk_stop are outputs for
// observation. A core logic block itself is not part of this design.
//
// Timing: one clock domain; each T_C bit takes one clock in the selector
// while the decoders emit one scan bit per clock each.
module golomb_soc_test #(
  parameter int unsigned M   = 4,
  parameter int unsigned LEN = 250,
  parameter int unsigned CAP = 250
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    data_in,
  output logic                    v_in,
  output logic [M-1:0][LEN-1:0]   core_cells,
  input  logic [M-1:0][CAP-1:0]   core_resp,
  output logic [M-1:0]            capture,
  output logic [M-1:0]            scan_out,
  output logic [M-1:0]            diff_bit,
  output logic [M-1:0]            diff_valid,
  output logic [$clog2(M)-1:0]    sel,
  output logic                    clk_stop
);

  logic          stall;
  logic [M-1:0]  dec_data, dec_valid, dec_ready, dec_en;

  assign stall = |capture;

  soc_channel_selector #(.M(M)) u_selector (
    .clk       (clk),
    .rst_n     (rst_n),
    .stall     (stall),
    .data_in   (data_in),
    .v_in      (v_in),
    .dec_data  (dec_data),
    .dec_valid (dec_valid),
    .sel       (sel),
    .clk_stop  (clk_stop)
  );

  for (genvar c = 0; c < M; c++) begin : g_core
    core_decompressor #(.M(M), .LEN(LEN), .CAP(CAP)) u_decomp (
      .clk         (clk),
      .rst_n       (rst_n),
      .stall       (stall),
      .bit_in      (dec_data[c]),
      .bit_valid   (dec_valid[c]),
      .bit_ready   (dec_ready[c]),
      .en          (dec_en[c]),
      .capture_req (capture[c]),
      .resp        (core_resp[c]),
      .cells       (core_cells[c]),
      .scan_out    (scan_out[c]),
      .diff_bit    (diff_bit[c]),
      .diff_valid  (diff_valid[c])
    );

    // The selector does not wait: a decoder must take every bit it is sent.
    assert property (@(posedge clk) disable iff (!rst_n)
                     dec_valid[c] && !stall |-> dec_ready[c])
      else $error("golomb_soc_test: core %0d decoder was busy", c);
  end

  // The request output of each decoder is not needed: the selector's fixed
  // schedule replaces it.
  logic unused_en;
  assign unused_en = ^dec_en;

endmodule
