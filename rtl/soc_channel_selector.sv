// SOC channel selector: one tester channel shared by M cores.
//
// The FSM, the i-bit counter (i = log2(M)) and the demultiplexer of the
// interleaving architecture. T_C interleaves the Golomb codes of M cores:
// one prefix bit of core 0, one of core 1, ..., and whenever a core's turn
// brings a separator zero, that zero and the core's whole tail in one burst.
// The counter steps to the next core after each prefix bit and stands still
// while clk_stop is high, so separator and tail reach the same core.
//
// Interface: data_in/v_in to the tester (see selector_fsm); dec_data and
// dec_valid, one pair per core decoder, valid for one clock. sel and
// clk_stop are brought out for observation. stall freezes the selector for
// a scan-capture cycle.
//
// Timing: a bit read in cycle t reaches its decoder in cycle t+1. A core
// gets a prefix bit at most every M cycles, and its separator and tail bits
// on consecutive cycles.
module soc_channel_selector #(
  parameter int unsigned M = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 stall,
  input  logic                 data_in,
  output logic                 v_in,
  output logic [M-1:0]         dec_data,
  output logic [M-1:0]         dec_valid,
  output logic [$clog2(M)-1:0] sel,
  output logic                 clk_stop
);

  logic data_out, v_out;

  selector_fsm #(.M(M)) u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .stall    (stall),
    .data_in  (data_in),
    .v_in     (v_in),
    .clk_stop (clk_stop),
    .data_out (data_out),
    .v_out    (v_out)
  );

  channel_counter #(.M(M)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .stop  (clk_stop || stall),
    .sel   (sel)
  );

  channel_demux #(.M(M)) u_demux (
    .data      (data_out),
    .valid     (v_out),
    .sel       (sel),
    .out_data  (dec_data),
    .out_valid (dec_valid)
  );

endmodule
