// End-to-end testbench for hamming63_top at its default parameters.
//
// The testbench closes the link: the transmit side's code word goes through a channel
// model that flips no bit, one bit or two bits, chosen at random each clock, and is
// fed to the receive side with the transmit valid flag. Every output is compared with a
// scoreboard built from the position rule of the code (P1 checks positions 3 and 5,
// P2 checks 3 and 6, P3 checks 5 and 6), not from the design's modules:
//   - tx_codeword_o must be the code word of the data accepted GEN_ZONES clocks earlier,
//   - rx_edp_o must be the check of the message accepted DET_ZONES clocks earlier,
//     zero for a clean message, the flipped position for a single-bit error and
//     nonzero for a double-bit error,
//   - rx_data_o must be that message's data bits, and equal the sent data when clean.
// It also counts each mechanism of the design: clean transfer, detected single and
// double errors, back-to-back words, idle ticks, and a reset in mid-stream that must
// flush both pipelines. A mechanism that never occurs counts as a failure.
module tb_hamming63_top;
  import hamming63_pkg::*;

  localparam int GEN_LAT = 2;   // 0.5 ns at 0.25 ns per zone
  localparam int DET_LAT = 3;   // 0.75 ns at 0.25 ns per zone
  localparam int NCYC    = 3000;
  localparam int RST_AT  = 1500;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      tx_valid_i, tx_valid_o, rx_valid_i, rx_valid_o;
  data_t     tx_data_i, rx_data_o;
  codeword_t tx_codeword_o, rx_codeword_i, err_mask;
  edp_t      rx_edp_o;

  hamming63_top dut (
    .clk, .rst_n,
    .tx_valid_i, .tx_data_i, .tx_valid_o, .tx_codeword_o,
    .rx_valid_i, .rx_codeword_i, .rx_valid_o, .rx_edp_o, .rx_data_o
  );

  // Channel model between the two ends.
  assign rx_valid_i    = tx_valid_o;
  assign rx_codeword_i = tx_codeword_o ^ err_mask;

  typedef struct {
    logic       valid;
    logic [2:0] data;    // {D1, D2, D3}
  } tx_rec_t;

  typedef struct {
    logic       valid;
    logic [6:1] msg;
    logic [6:1] mask;
  } rx_rec_t;

  tx_rec_t tx_hist [NCYC + 8];
  rx_rec_t rx_hist [NCYC + 8];

  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0, n_b2b = 0, n_idle = 0, n_flush = 0;
  int n_tx_out = 0;
  logic prev_rx_valid_o = 1'b0;
  logic [2:0] tx_data_of_rx [NCYC + 8];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:1] encode(input logic [2:0] d);
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

  // EDP as the number {EDP3, EDP2, EDP1}.
  function automatic logic [2:0] check_bits(input logic [6:1] m);
    return {m[4] ^ m[5] ^ m[6], m[2] ^ m[3] ^ m[6], m[1] ^ m[3] ^ m[5]};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle: %s", what);
    end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < NCYC + 8; i++) begin
      tx_hist[i] = '{valid: 1'b0, data: '0};
      rx_hist[i] = '{valid: 1'b0, msg: '0, mask: '0};
      tx_data_of_rx[i] = '0;
    end
    rst_n      = 1'b0;
    tx_valid_i = 1'b0;
    tx_data_i  = '0;
    err_mask   = '0;
    cyc        = 0;
    repeat (2) @(posedge clk);
    #1;
    check(tx_valid_o === 1'b0 && rx_valid_o === 1'b0, "valid outputs not cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;

    while (cyc < NCYC) begin
      int kind;
      @(negedge clk);
      // Mid-stream reset: flush both pipelines.
      if (cyc == RST_AT) begin
        rst_n = 1'b0;
        #1;
        check(tx_valid_o === 1'b0 && rx_valid_o === 1'b0, "reset did not flush the pipelines");
        for (int i = 0; i <= cyc; i++) begin
          tx_hist[i].valid = 1'b0;
          rx_hist[i].valid = 1'b0;
        end
        n_flush++;
      end else if (cyc == RST_AT + 2) begin
        rst_n = 1'b1;
      end

      tx_valid_i = ($urandom_range(0, 4) != 0);
      tx_data_i  = data_t'($urandom_range(0, 7));
      kind       = $urandom_range(0, 3);
      err_mask   = '0;
      if (kind == 1) begin
        err_mask[$urandom_range(1, 6)] = 1'b1;
      end else if (kind == 2) begin
        int a, b;
        a = $urandom_range(1, 6);
        b = $urandom_range(1, 5);
        if (b >= a) b++;
        err_mask[a] = 1'b1;
        err_mask[b] = 1'b1;
      end
      #1;
      tx_hist[cyc] = '{valid: tx_valid_i && rst_n, data: tx_data_i};
      rx_hist[cyc] = '{valid: rx_valid_i && rst_n, msg: rx_codeword_i, mask: err_mask};
      if (cyc >= GEN_LAT) tx_data_of_rx[cyc] = tx_hist[cyc - GEN_LAT].data;

      @(posedge clk);
      cyc++;
      #1;

      // Transmit side: GEN_LAT clocks after the data was accepted.
      if (cyc >= GEN_LAT) begin
        tx_rec_t t;
        t = tx_hist[cyc - GEN_LAT];
        check(tx_valid_o === t.valid, $sformatf("%0d tx_valid_o=%0b expected %0b", cyc, tx_valid_o, t.valid));
        if (t.valid) begin
          n_tx_out++;
          check(tx_codeword_o === encode(t.data),
                $sformatf("%0d tx code word %06b expected %06b", cyc, tx_codeword_o, encode(t.data)));
        end
      end

      // Receive side: DET_LAT clocks after the message was accepted.
      if (cyc >= DET_LAT) begin
        rx_rec_t r;
        logic [2:0] got;
        r   = rx_hist[cyc - DET_LAT];
        got = {rx_edp_o.edp3, rx_edp_o.edp2, rx_edp_o.edp1};
        check(rx_valid_o === r.valid, $sformatf("%0d rx_valid_o=%0b expected %0b", cyc, rx_valid_o, r.valid));
        if (r.valid) begin
          check(got === check_bits(r.msg),
                $sformatf("%0d EDP %03b expected %03b", cyc, got, check_bits(r.msg)));
          check(rx_data_o === {r.msg[3], r.msg[5], r.msg[6]},
                $sformatf("%0d rx data %03b", cyc, rx_data_o));
          case ($countones(r.mask))
            0: begin
              check(got === 3'b000, "clean message flagged");
              check(rx_data_o === tx_data_of_rx[cyc - DET_LAT], "clean message lost its data");
              n_clean++;
            end
            1: begin
              int pos;
              pos = 0;
              for (int p = 1; p <= 6; p++) if (r.mask[p]) pos = p;
              check(got == 3'(pos), $sformatf("%0d single error at %0d gave EDP %03b", cyc, pos, got));
              n_single++;
            end
            default: begin
              check(got !== 3'b000, "double error not detected");
              n_double++;
            end
          endcase
          if (prev_rx_valid_o) n_b2b++;
        end else begin
          n_idle++;
        end
        prev_rx_valid_o = rx_valid_o;
      end
    end

    $display("mechanisms: clean=%0d single_err=%0d double_err=%0d back_to_back=%0d idle=%0d flush=%0d tx_words=%0d",
             n_clean, n_single, n_double, n_b2b, n_idle, n_flush, n_tx_out);
    check(n_clean  > 0, "no clean transfer happened");
    check(n_single > 0, "no single-bit error happened");
    check(n_double > 0, "no double-bit error happened");
    check(n_b2b    > 0, "no back-to-back words happened");
    check(n_idle   > 0, "no idle tick happened");
    check(n_flush  > 0, "no mid-stream reset happened");
    check(n_tx_out > 0, "no word left the transmit side");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
