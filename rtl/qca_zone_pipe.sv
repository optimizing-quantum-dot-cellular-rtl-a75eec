// Clock-zone latency model: a register pipeline of STAGES stages with a valid flag.
//
// A QCA circuit is clocked in zones, each a quarter of the clock cycle, and a signal
// advances one zone per quarter cycle; the circuit's latency is the number of zones its
// longest path crosses. This module stands for that timing: clk ticks once per zone,
// and a word presented with valid_i at one rising edge appears on data_o with valid_o
// after exactly STAGES rising edges. One word can enter on every tick.
//
// Interface: clk, rst_n (active-low, asynchronous), valid_i/data_i in, valid_o/data_o out.
// Timing: latency STAGES ticks, throughput one word per tick. STAGES = 0 makes it a
// wire. The one-register-per-zone model, the valid flag and the reset are this design's
// choices; the zone counts used by hamming63_top come from the published latencies.
module qca_zone_pipe #(
  parameter int unsigned WIDTH  = 6,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [WIDTH-1:0] data_i,
  output logic             valid_o,
  output logic [WIDTH-1:0] data_o
);

  if (STAGES == 0) begin : g_wire
    always_comb begin
      valid_o = valid_i;
      data_o  = data_i;
    end
  end else begin : g_regs
    logic             valid_q [STAGES];
    logic [WIDTH-1:0] data_q  [STAGES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned s = 0; s < STAGES; s++) begin
          valid_q[s] <= 1'b0;
          data_q[s]  <= '0;
        end
      end else begin
        valid_q[0] <= valid_i;
        data_q[0]  <= data_i;
        for (int unsigned s = 1; s < STAGES; s++) begin
          valid_q[s] <= valid_q[s-1];
          data_q[s]  <= data_q[s-1];
        end
      end
    end

    always_comb begin
      valid_o = valid_q[STAGES-1];
      data_o  = data_q[STAGES-1];
    end
  end

endmodule
