// Self-checking test of selector_fsm.
//
// Part 1 replays the composite stream 1010110011011 for four cores (m = 4)
// and compares clk_stop, v_in, data_out and v_out cycle by cycle with values
// worked out by hand from the transition outputs of the m = 4 state diagram.
// Part 2 feeds a long random stream with random stalls, to M = 4 and M = 8
// instances, and checks that every bit comes out once and in order, that
// clk_stop is high for exactly M cycles after each separator and that the
// tester is asked for each bit exactly once.
module tb_selector_fsm;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- part 1: hand-worked trace ----------------
  logic rst1, din1, vin1, stop1, dout1, vout1;
  selector_fsm dut1 (.clk, .rst_n(rst1), .stall(1'b0), .data_in(din1),
                     .v_in(vin1), .clk_stop(stop1), .data_out(dout1), .v_out(vout1));

  localparam string TC = "1010110011011";
  //                             cycle: 0....5....0....5....
  localparam string EXP_STOP = "00111100011110011110";
  localparam string EXP_VIN  = "11100111110011110011";

  int idx1;
  initial begin
    // data_out/v_out in cycles 1..20 ('-' = not valid)
    automatic string eo = "1010--11001--1011--1";
    rst1 = 1'b0; idx1 = 0; din1 = 1'b1;
    @(posedge clk); #1;
    rst1 = 1'b1;
    for (int cyc = 0; cyc <= 20; cyc++) begin
      din1 = (idx1 < TC.len()) ? (TC[idx1] == "1") : 1'b1;
      #1;
      if (cyc < 20) begin
        checks += 2;
        if (stop1 != (EXP_STOP[cyc] == "1")) begin failures++; $display("fig trace cycle %0d: clk_stop %b", cyc, stop1); end
        if (vin1 != (EXP_VIN[cyc] == "1")) begin failures++; $display("fig trace cycle %0d: v_in %b", cyc, vin1); end
      end
      if (cyc >= 1) begin
        checks++;
        if (eo[cyc-1] == "-") begin
          if (vout1) begin failures++; $display("fig trace cycle %0d: v_out high", cyc); end
        end else if (!vout1 || dout1 != (eo[cyc-1] == "1")) begin
          failures++; $display("fig trace cycle %0d: out %b/%b", cyc, dout1, vout1);
        end
      end
      @(posedge clk);
      if (vin1) idx1++;
      #1;
    end
  end

  // ---------------- part 2: random streams ----------------
  logic rst2, stall;
  logic [1:0] din2, vin2, stop2, dout2, vout2;
  selector_fsm #(.M(4)) dut4 (.clk, .rst_n(rst2), .stall, .data_in(din2[0]), .v_in(vin2[0]),
                              .clk_stop(stop2[0]), .data_out(dout2[0]), .v_out(vout2[0]));
  selector_fsm #(.M(8)) dut8 (.clk, .rst_n(rst2), .stall, .data_in(din2[1]), .v_in(vin2[1]),
                              .clk_stop(stop2[1]), .data_out(dout2[1]), .v_out(vout2[1]));

  bit tc2 [2][$];
  int rd [2], wr [2], stop_run [2], n_tail [2], n_stall;
  logic done2 = 1'b0;

  initial begin
    n_stall = 0;
    for (int i = 0; i < 2; i++) begin
      for (int k = 0; k < 4000; k++) tc2[i].push_back(($urandom % 3) != 0);
      rd[i] = 0; wr[i] = 0; stop_run[i] = 0; n_tail[i] = 0;
    end
    rst2 = 1'b0; stall = 1'b0;
    @(posedge clk); #1;
    rst2 = 1'b1;
    while (rd[0] < 3900 || rd[1] < 3900) begin
      stall = ($urandom % 8 == 0);
      din2[0] = tc2[0][rd[0]];
      din2[1] = tc2[1][rd[1]];
      #1;
      for (int i = 0; i < 2; i++) begin
        // outputs registered from the previous cycle
        if (vout2[i] && !stall) begin
          checks++;
          if (dout2[i] != tc2[i][wr[i]]) begin failures++; $display("M=%0d: output %0d wrong", 4 << (2*i) >> i, wr[i]); end
          wr[i]++;
        end
        if (stall) begin
          checks++;
          if (vin2[i]) failures++;
        end else if (stop2[i]) stop_run[i]++;
        else if (stop_run[i] != 0) begin
          checks++;
          if (stop_run[i] != (i == 0 ? 4 : 8)) begin failures++; $display("clk_stop ran %0d cycles", stop_run[i]); end
          stop_run[i] = 0;
          n_tail[i]++;
        end
      end
      if (stall) n_stall++;
      @(posedge clk);
      for (int i = 0; i < 2; i++) if (vin2[i]) rd[i]++;
      #1;
    end
    done2 = 1'b1;
  end

  initial begin
    wait (done2);
    checks += 3;
    if (n_tail[0] == 0 || n_tail[1] == 0 || n_stall == 0) failures++;
    // all bits read were put out, bar the last few still in flight
    if (wr[0] < rd[0] - 4 || wr[1] < rd[1] - 4) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
