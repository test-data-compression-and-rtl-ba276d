// FSM of the SOC channel selector.
//
// Reads the composite stream T_C one bit per cycle. While it reads prefix
// ones it passes each on (data_out, v_out) and lets the channel counter
// advance. A zero marks the separator in front of a tail: the FSM passes the
// zero on, then raises clk_stop for the next M cycles, in which it passes
// the log2(M) tail bits on unchanged and waits for the rest, so the counter,
// and with it the demultiplexer output, stays on the same core for the
// separator and the whole tail (1 + M cycles).
//
// Outputs per transition follow the published m = 4 diagram, for any power
// of two M:
//   prefix state, data_in = 1 : clk_stop 0, v_in 1, data_out 1, v_out 1
//   prefix state, data_in = 0 : clk_stop 0, v_in 1, data_out 0, v_out 1
//   tail cycle j < log2(M)    : clk_stop 1, data_out = data_in, v_out 1
//   tail cycle j >= log2(M)   : clk_stop 1, v_out 0
//   v_in in tail cycle j is 1 for j < log2(M)-1 and for j = M-1.
// v_in high means that the next cycle reads a new bit of T_C: the tester
// moves to its next bit on every clock edge with v_in high, and presents
// the first bit of T_C from reset.
//
// Timing: clk_stop and v_in are combinational (Mealy) outputs of the
// current state and data_in; data_out and v_out are registered, so they
// appear one clock after the bit was read, on the same edge at which the
// channel counter moves. stall freezes the FSM and its output registers
// and forces v_in low (added here for scan capture).
module selector_fsm
  import golomb_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic stall,
  input  logic data_in,
  output logic v_in,
  output logic clk_stop,
  output logic data_out,
  output logic v_out
);

  localparam int unsigned N = log2m(M);
  typedef logic [N-1:0] ph_t;
  localparam ph_t NBITS = ph_t'(N);
  localparam ph_t PH_LAST = ph_t'(M - 1);

  if (M < 2 || (M & (M - 1)) != 0) begin : g_bad_m
    $error("selector_fsm: M must be a power of two, at least 2");
  end

  sel_state_e state_q, state_d;
  ph_t ph_q, ph_d;
  logic out_d, vout_d, vin_c;

  always_comb begin
    state_d  = state_q;
    ph_d     = ph_q;
    clk_stop = 1'b0;
    vin_c    = 1'b0;
    out_d    = 1'b0;
    vout_d   = 1'b0;
    unique case (state_q)
      SEL_PREFIX: begin
        vin_c  = 1'b1;
        out_d  = data_in;
        vout_d = 1'b1;
        if (!data_in) begin
          state_d = SEL_TAIL;
          ph_d    = '0;
        end
      end
      SEL_TAIL: begin
        clk_stop = 1'b1;
        if (ph_q < NBITS) begin
          out_d  = data_in;
          vout_d = 1'b1;
        end
        vin_c = (ph_q + 1'b1 < NBITS) || (ph_q == PH_LAST);
        if (ph_q == PH_LAST) state_d = SEL_PREFIX;
        else ph_d = ph_q + 1'b1;
      end
      default: state_d = SEL_PREFIX;
    endcase
  end

  assign v_in = vin_c && !stall;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= SEL_PREFIX;
      ph_q     <= '0;
      data_out <= 1'b0;
      v_out    <= 1'b0;
    end else if (!stall) begin
      state_q  <= state_d;
      ph_q     <= ph_d;
      data_out <= out_d;
      v_out    <= vout_d;
    end
  end

endmodule
