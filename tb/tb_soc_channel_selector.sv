// Self-checking test of soc_channel_selector.
//
// Part 1 replays the four-core stream 1010110011011 (m = 4) and checks
// which core receives which bit: core 0 a prefix one, core 1 the separator
// and tail 10, core 2 and core 3 a prefix one each, core 0 the separator
// and tail 01, core 1 a prefix one, core 2 the separator and tail 11.
// Part 2 interleaves random Golomb codes of four (M = 4) and eight (M = 8)
// cores with the reference interleaver, streams them with random stalls and
// checks that each core receives exactly its own code, a prefix bit no
// sooner than M unstalled cycles after its previous bit, and the tail bits
// on the cycles right after the separator.
module tb_soc_channel_selector;
  import tb_golomb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- part 1 ----------------
  logic rst1, din1, vin1, stop1;
  logic [3:0] dd1, dv1;
  logic [1:0] sel1;
  soc_channel_selector dut1 (.clk, .rst_n(rst1), .stall(1'b0), .data_in(din1), .v_in(vin1),
                             .dec_data(dd1), .dec_valid(dv1), .sel(sel1), .clk_stop(stop1));

  localparam string TC = "1010110011011";
  // expected deliveries as core:bit pairs, in order
  localparam string EXP = "01101110213100000111202121";
  int got1;
  initial begin
    int idx;
    rst1 = 1'b0; idx = 0; got1 = 0;
    @(posedge clk); #1;
    rst1 = 1'b1;
    repeat (24) begin
      din1 = (idx < TC.len()) ? (TC[idx] == "1") : 1'b1;
      #1;
      checks++;
      if ($countones(dv1) > 1) failures++;
      for (int c = 0; c < 4; c++) if (dv1[c] && got1 < 13) begin
        checks++;
        if (EXP[2*got1] != "0" + c || EXP[2*got1+1] != (dd1[c] ? "1" : "0")) begin
          failures++;
          $display("delivery %0d: core %0d bit %b", got1, c, dd1[c]);
        end
        got1++;
      end
      @(posedge clk);
      if (vin1) idx++;
      #1;
    end
    checks++;
    if (got1 < 13) begin failures++; $display("only %0d deliveries", got1); end
  end

  // ---------------- part 2 ----------------
  logic rst2, stall;
  logic [1:0] din2, vin2, stop2;
  logic [3:0] dd4, dv4;
  logic [7:0] dd8, dv8;
  logic [1:0] sel4;
  logic [2:0] sel8;
  soc_channel_selector #(.M(4)) dut4 (.clk, .rst_n(rst2), .stall, .data_in(din2[0]), .v_in(vin2[0]),
                                      .dec_data(dd4), .dec_valid(dv4), .sel(sel4), .clk_stop(stop2[0]));
  soc_channel_selector #(.M(8)) dut8 (.clk, .rst_n(rst2), .stall, .data_in(din2[1]), .v_in(vin2[1]),
                                      .dec_data(dd8), .dec_valid(dv8), .sel(sel8), .clk_stop(stop2[1]));

  bitq_t codes4 [], codes8 [], tc4, tc8;
  int pos4 [] = new[4], pos8 [] = new[8], last4 [] = new[4], last8 [] = new[8];
  int tailleft4 [] = new[4], tailleft8 [] = new[8];
  int n_stall = 0, n_wrap = 0;

  function automatic bitq_t rand_code(int unsigned m, int unsigned nbits);
    bitq_t d;
    while (d.size() < nbits) begin
      repeat ($urandom % (3 * m)) d.push_back(1'b0);
      d.push_back(1'b1);
    end
    return golomb_encode(d, m);
  endfunction

  // Check one delivery to core c of a group of size m.
  task automatic deliver(input int unsigned m, input int c, input bit b, input int cyc,
                         ref bitq_t codes [], ref int pos [], ref int last [], ref int tailleft []);
    int unsigned n = clog2u(m);
    checks++;
    if (pos[c] < codes[c].size()) begin
      if (b != codes[c][pos[c]]) begin failures++; $display("M=%0d core %0d bit %0d wrong", m, c, pos[c]); end
    end else if (b != 1'b1) begin
      failures++; $display("M=%0d core %0d filler is not a one", m, c);
    end
    checks++;
    if (tailleft[c] > 0) begin
      if (cyc != last[c] + 1) begin failures++; $display("M=%0d core %0d tail bit late", m, c); end
      tailleft[c]--;
    end else begin
      if (last[c] >= 0 && cyc < last[c] + int'(m)) begin failures++; $display("M=%0d core %0d bit too early", m, c); end
      if (b == 1'b0) tailleft[c] = n;
    end
    last[c] = cyc;
    pos[c]++;
  endtask

  logic done2 = 1'b0;
  initial begin
    int unsigned f4, f8;
    int i4, i8, cyc;
    codes4 = new[4];
    codes8 = new[8];
    foreach (codes4[c]) codes4[c] = rand_code(4, 400 + 50 * c);
    foreach (codes8[c]) codes8[c] = rand_code(8, 300 + 40 * c);
    tc4 = interleave(codes4, 4, f4);
    tc8 = interleave(codes8, 8, f8);
    foreach (pos4[c]) begin pos4[c] = 0; last4[c] = -1; tailleft4[c] = 0; end
    foreach (pos8[c]) begin pos8[c] = 0; last8[c] = -1; tailleft8[c] = 0; end
    rst2 = 1'b0; stall = 1'b0; i4 = 0; i8 = 0; cyc = 0;
    @(posedge clk); #1;
    rst2 = 1'b1;
    while (i4 < tc4.size() + 8 || i8 < tc8.size() + 16) begin
      stall = ($urandom % 10 == 0);
      din2[0] = (i4 < tc4.size()) ? tc4[i4] : 1'b1;
      din2[1] = (i8 < tc8.size()) ? tc8[i8] : 1'b1;
      #1;
      if (stall) n_stall++;
      else begin
        for (int c = 0; c < 4; c++) if (dv4[c]) deliver(4, c, dd4[c], cyc, codes4, pos4, last4, tailleft4);
        for (int c = 0; c < 8; c++) if (dv8[c]) deliver(8, c, dd8[c], cyc, codes8, pos8, last8, tailleft8);
        if (sel4 == 2'd3 && !stop2[0]) n_wrap++;
        cyc++;
      end
      @(posedge clk);
      if (vin2[0]) i4++;
      if (vin2[1]) i8++;
      #1;
    end
    for (int c = 0; c < 4; c++) begin checks++; if (pos4[c] < codes4[c].size()) begin failures++; $display("M=4 core %0d short", c); end end
    for (int c = 0; c < 8; c++) begin checks++; if (pos8[c] < codes8[c].size()) begin failures++; $display("M=8 core %0d short", c); end end
    checks++;
    if (n_stall == 0 || n_wrap == 0 || f4 == 0) failures++;
    done2 = 1'b1;
  end

  initial begin
    wait (done2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
