// Self-checking testbench for hamming63_detector.
//
// Exhaustive over all 64 six-bit messages. For each, the expected EDP bits are the
// xor of the positions each check covers, parity position included
// (EDP1: 1,3,5; EDP2: 2,3,6; EDP3: 4,5,6), the expected pass-through data are the
// bits at positions 3, 5 and 6, and the expected pair outputs are the data xors.
// It then takes each valid code word, flips each single bit and checks that the
// EDP bits, read as a binary number EDP3 EDP2 EDP1, name the flipped position, and
// checks the worked example D = 001, P = 000 -> EDP = 011.
module tb_hamming63_detector;
  import hamming63_pkg::*;

  codeword_t cw;
  edp_t      edp;
  data_t     dat;
  pair_t     pair;
  int checks    = 0;
  int failures  = 0;
  int n_valid   = 0;

  hamming63_detector dut (.codeword_i(cw), .edp_o(edp), .data_o(dat), .pair_o(pair));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [6:1] m;
      logic [2:0] exp_edp, exp_dat, exp_pair;
      m        = i[5:0];
      exp_edp  = {m[1] ^ m[3] ^ m[5], m[2] ^ m[3] ^ m[6], m[4] ^ m[5] ^ m[6]};
      exp_dat  = {m[3], m[5], m[6]};
      exp_pair = {m[3] ^ m[5], m[5] ^ m[6], m[6] ^ m[3]};
      cw = m;
      #1;
      checks++;
      if (edp !== exp_edp) begin
        failures++;
        $display("FAIL msg=%06b: EDP %03b, expected %03b", m, edp, exp_edp);
      end
      checks++;
      if (dat !== exp_dat || pair !== exp_pair) begin
        failures++;
        $display("FAIL msg=%06b: data %03b pair %03b, expected %03b %03b", m, dat, pair,
                 exp_dat, exp_pair);
      end
      if (exp_edp == 3'b000) n_valid++;
    end
    checks++;
    if (n_valid != 8) begin
      failures++;
      $display("FAIL %0d messages pass the check, expected 8", n_valid);
    end

    // Worked example: D1=0, D2=0, D3=1 with all parity bits 0 gives
    // EDP1=0, EDP2=1, EDP3=1.
    cw = '0;
    cw[POS_D3] = 1'b1;
    #1;
    checks++;
    if (edp !== '{edp1: 1'b0, edp2: 1'b1, edp3: 1'b1}) begin
      failures++;
      $display("FAIL example D=001 P=000: EDP %03b", edp);
    end

    // Single-bit errors on every code word: syndrome = error position.
    for (int d = 0; d < 8; d++) begin
      logic [6:1] good;
      good    = '0;
      good[3] = d[2];
      good[5] = d[1];
      good[6] = d[0];
      good[1] = good[3] ^ good[5];
      good[2] = good[3] ^ good[6];
      good[4] = good[5] ^ good[6];
      cw = good;
      #1;
      checks++;
      if (edp !== 3'b000) begin
        failures++;
        $display("FAIL clean code word %06b flagged, EDP %03b", good, edp);
      end
      for (int pos = 1; pos <= 6; pos++) begin
        logic [6:1] bad;
        bad      = good;
        bad[pos] = ~bad[pos];
        cw = bad;
        #1;
        checks++;
        if ({edp.edp3, edp.edp2, edp.edp1} != 3'(pos)) begin
          failures++;
          $display("FAIL code word %06b with bit %0d flipped: EDP3..1 = %0b%0b%0b",
                   good, pos, edp.edp3, edp.edp2, edp.edp1);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
