// Demultiplexer of the SOC channel selector.
//
// Routes the selector FSM output (data, valid) to the decoder of core sel.
// Every decoder sees the data bit; only the selected one sees valid high.
// Purely combinational. The document names the demultiplexer and its
// connections; the valid-per-output form is this design's choice.
module channel_demux #(
  parameter int unsigned M = 4
) (
  input  logic                 data,
  input  logic                 valid,
  input  logic [$clog2(M)-1:0] sel,
  output logic [M-1:0]         out_data,
  output logic [M-1:0]         out_valid
);

  always_comb begin
    for (int unsigned c = 0; c < M; c++) begin
      out_data[c]  = data && (sel == ($clog2(M))'(c));
      out_valid[c] = valid && (sel == ($clog2(M))'(c));
    end
  end

endmodule
