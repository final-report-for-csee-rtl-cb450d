// i2c_master: write-only two-wire master for the codec's control port.
//
// Sends one 24-bit transfer, {device address, byte 1, byte 2}, as a single
// bus write: START, three bytes MSB first each followed by an acknowledge
// bit, STOP. Every bit takes four sequence steps with SCL low, high, high,
// low and SDA set up during the first; the acknowledge bits release SDA and
// sample it while SCL is high. nack reports whether any of the three bytes
// went unacknowledged (SDA read high).
//
// Follows the published design: the 24-bit transfer, four steps per bit,
// one step per two periods of a clock divided down by
// CLK_FREQ / I2C_FREQ + 1 (50 MHz / 40 kHz, so a step is 2502 clocks and
// SCL runs at about 5 kHz), and the OR of the three acknowledge bits. This
// design's own choices: a start/done pulse handshake, acknowledge sampled
// while SCL is high, and SDA as separate out / output-enable / in signals
// (sda_oe = 1 drives sda_o, otherwise the line is released and pulled up).
//
// Timing: start is accepted when busy is low; done pulses for one clock
// when the STOP condition is complete, with nack valid in the same cycle.
module i2c_master #(
  parameter int unsigned CLK_FREQ = 50_000_000,
  parameter int unsigned I2C_FREQ = 40_000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic [23:0] data,
  output logic        busy,
  output logic        done,
  output logic        nack,
  output logic        scl,
  output logic        sda_o,
  output logic        sda_oe,
  input  logic        sda_i
);
  localparam int unsigned STEP_CLKS = 2 * (CLK_FREQ / I2C_FREQ + 1);
  localparam int unsigned DW        = $clog2(STEP_CLKS);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP} phase_t;

  phase_t      phase;
  logic [1:0]  sub;        // step within a bit: 0..3
  logic [4:0]  bit_idx;    // bits left in the transfer, 23..0
  logic [23:0] shreg;
  logic [DW-1:0] div;
  logic        step;

  always_ff @(posedge clk) begin
    if (reset || phase == S_IDLE || div == DW'(STEP_CLKS - 1)) div <= '0;
    else                                                       div <= div + 1'b1;
  end
  assign step = (div == DW'(STEP_CLKS - 1));
  assign busy = (phase != S_IDLE);

  // Handshake rule: a new transfer is only requested while the bus is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (reset) start |-> !busy);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (reset) begin
      phase   <= S_IDLE;
      sub     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      nack    <= 1'b0;
      scl     <= 1'b1;
      sda_o   <= 1'b1;
      sda_oe  <= 1'b1;
    end else if (phase == S_IDLE) begin
      scl    <= 1'b1;
      sda_o  <= 1'b1;
      sda_oe <= 1'b1;
      if (start) begin
        phase   <= S_START;
        sub     <= '0;
        shreg   <= data;
        bit_idx <= 5'd23;
        nack    <= 1'b0;
      end
    end else if (step) begin
      sub <= sub + 1'b1;
      unique case (phase)
        S_START: begin
          // SDA falls while SCL is high, then SCL falls.
          if (sub == 2'd0) sda_o <= 1'b0;
          if (sub == 2'd1) begin scl <= 1'b0; phase <= S_BIT; sub <= '0; end
        end
        S_BIT: begin
          unique case (sub)
            2'd0: begin scl <= 1'b0; sda_oe <= 1'b1; sda_o <= shreg[23]; end
            2'd1: scl <= 1'b1;
            2'd2: scl <= 1'b1;
            2'd3: begin
              scl   <= 1'b0;
              shreg <= {shreg[22:0], 1'b0};
              if (bit_idx[2:0] == 3'd0) phase <= S_ACK;
              bit_idx <= bit_idx - 1'b1;
            end
          endcase
        end
        S_ACK: begin
          unique case (sub)
            2'd0: begin scl <= 1'b0; sda_oe <= 1'b0; end
            2'd1: scl <= 1'b1;
            2'd2: begin scl <= 1'b1; nack <= nack | sda_i; end
            2'd3: begin
              scl <= 1'b0;
              // bit_idx wrapped below zero after the last data bit
              phase <= (bit_idx == 5'd31) ? S_STOP : S_BIT;
            end
          endcase
        end
        S_STOP: begin
          unique case (sub)
            2'd0: begin scl <= 1'b0; sda_oe <= 1'b1; sda_o <= 1'b0; end
            2'd1: scl <= 1'b1;
            2'd2: sda_o <= 1'b1;
            2'd3: begin phase <= S_IDLE; done <= 1'b1; end
          endcase
        end
        default: phase <= S_IDLE;
      endcase
    end
  end
endmodule
