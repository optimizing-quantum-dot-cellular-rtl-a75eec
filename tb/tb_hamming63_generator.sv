// Self-checking testbench for hamming63_generator.
//
// Exhaustive over the eight data words. The expected message is built from the
// position rule alone: each parity bit is the xor of the data bits at the positions
// it checks (P1: 3 and 5, P2: 3 and 6, P3: 5 and 6), and the data bits sit at
// positions 3, 5 and 6. It also checks the parity_o struct, the worked example
// D = 001 -> P = 011, and that every code word differs from every other in at least
// three positions (minimum distance of a single-error-detecting Hamming code).
module tb_hamming63_generator;
  import hamming63_pkg::*;

  data_t     data;
  codeword_t cw;
  parity_t   par;
  codeword_t all_cw [8];
  int checks   = 0;
  int failures = 0;

  hamming63_generator dut (.data_i(data), .codeword_o(cw), .parity_o(par));

  function automatic codeword_t expected_codeword(input logic [2:0] d);
    // d = {D1, D2, D3}
    logic [6:1] m;
    m    = '0;
    m[3] = d[2];
    m[5] = d[1];
    m[6] = d[0];
    m[1] = m[3] ^ m[5];
    m[2] = m[3] ^ m[6];
    m[4] = m[5] ^ m[6];
    return m;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      codeword_t exp_cw;
      data   = data_t'(i[2:0]);
      exp_cw = expected_codeword(i[2:0]);
      #1;
      checks++;
      if (cw !== exp_cw) begin
        failures++;
        $display("FAIL D=%03b: codeword %06b, expected %06b (bit 6..1)", i[2:0], cw, exp_cw);
      end
      checks++;
      if (par !== {exp_cw[1], exp_cw[2], exp_cw[4]}) begin
        failures++;
        $display("FAIL D=%03b: parity %03b, expected %03b", i[2:0], par,
                 {exp_cw[1], exp_cw[2], exp_cw[4]});
      end
      all_cw[i] = cw;
    end

    // Worked example: D1=0, D2=0, D3=1 gives P1=0, P2=1, P3=1.
    data = '{d1: 1'b0, d2: 1'b0, d3: 1'b1};
    #1;
    checks++;
    if (par !== '{p1: 1'b0, p2: 1'b1, p3: 1'b1}) begin
      failures++;
      $display("FAIL example D=001: parity %03b", par);
    end

    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++) begin
        checks++;
        if ($countones(all_cw[i] ^ all_cw[j]) < 3) begin
          failures++;
          $display("FAIL distance between code words %0d and %0d below 3", i, j);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
