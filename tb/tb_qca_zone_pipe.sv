// Self-checking testbench for qca_zone_pipe.
//
// Runs three instances (STAGES = 0, 2 and 3) side by side. A random word with a random
// valid flag enters on every clock; a scoreboard keeps the words entered and checks
// that each output equals the input of exactly STAGES clocks earlier (the wire variant
// is checked in the same cycle). Reset must clear valid, and no valid may leave before
// STAGES clocks after reset. A watchdog ends the run if it hangs.
module tb_qca_zone_pipe;

  localparam int unsigned W      = 6;
  localparam int unsigned NCYC   = 400;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         vin;
  logic [W-1:0] din;
  logic         v0, v2, v3;
  logic [W-1:0] d0, d2, d3;
  logic [W:0]   hist [$];   // {valid, data} per clock, newest at the back
  int checks    = 0;
  int failures  = 0;
  int n_valid_out = 0;

  qca_zone_pipe #(.WIDTH(W), .STAGES(0)) dut0 (.clk, .rst_n, .valid_i(vin), .data_i(din), .valid_o(v0), .data_o(d0));
  qca_zone_pipe #(.WIDTH(W), .STAGES(2)) dut2 (.clk, .rst_n, .valid_i(vin), .data_i(din), .valid_o(v2), .data_o(d2));
  qca_zone_pipe #(.WIDTH(W), .STAGES(3)) dut3 (.clk, .rst_n, .valid_i(vin), .data_i(din), .valid_o(v3), .data_o(d3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_delayed(input int unsigned n, input logic v, input logic [W-1:0] d);
    logic [W:0] e;
    if (hist.size() < n) begin
      checks++;
      if (v !== 1'b0) begin
        failures++;
        $display("FAIL STAGES=%0d: valid too early", n);
      end
      return;
    end
    e = hist[hist.size() - n];
    checks++;
    if (v !== e[W] || (e[W] && d !== e[W-1:0])) begin
      failures++;
      $display("FAIL STAGES=%0d: got v=%0b d=%h, expected v=%0b d=%h", n, v, d, e[W], e[W-1:0]);
    end
    if (v) n_valid_out++;
  endtask

  initial begin
    rst_n = 1'b0;
    vin   = 1'b1;
    din   = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (v2 !== 1'b0 || v3 !== 1'b0 || d2 !== '0 || d3 !== '0) begin
      failures++;
      $display("FAIL reset does not clear the pipeline");
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      vin = ($urandom_range(0, 3) != 0);
      din = W'($urandom);
      #1;
      // wire variant: same cycle
      checks++;
      if (v0 !== vin || d0 !== din) begin
        failures++;
        $display("FAIL STAGES=0: output differs from input");
      end
      @(posedge clk);
      hist.push_back({vin, din});
      #1;
      check_delayed(2, v2, d2);
      check_delayed(3, v3, d3);
      @(negedge clk);
    end
    checks++;
    if (n_valid_out == 0) begin
      failures++;
      $display("FAIL no valid word seen at any output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
