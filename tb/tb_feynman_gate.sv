// Self-checking testbench for feynman_gate.
//
// Applies all four input pairs and compares P and Q with the gate's truth table
// (P = A, Q = A xor B), and checks that the four output pairs are all different,
// which is the reversibility property of the gate. A watchdog ends the run if it hangs.
module tb_feynman_gate;

  logic a, b, p, q;
  int   checks   = 0;
  int   failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a_i(a), .b_i(b), .p_o(p), .q_o(q));

  // Expected (P,Q) for input index {A,B}, written out as a table.
  localparam logic [1:0] EXP_PQ [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = i[1:0];
      #1;
      checks++;
      if ({p, q} !== EXP_PQ[i]) begin
        failures++;
        $display("FAIL A=%0b B=%0b: got P=%0b Q=%0b, expected %02b", a, b, p, q, EXP_PQ[i]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL outputs not one-to-one: seen=%04b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
