// gassiplex_ctrl: control sequence of the Gassiplex front-end chips of one
// column controller.
//
// On start (the trigger) the block raises th, the Track/Hold line: the
// Gassiplex sampling capacitors keep the charge of every channel. After
// HOLD_SETUP clocks it issues a burst of N_PULSES clock pulses on gclk; each
// pulse moves the multiplexer on to the next channel, so the held charges
// appear one after another on the single analogue output line that the
// 5-DiLogic ADCs digitise. After the burst th is released and done pulses for
// one clock. busy is high from start to done.
//
// Timing: each gclk pulse is PULSE_HALF clocks high and PULSE_HALF clocks low,
// so th is high for HOLD_SETUP + 2*PULSE_HALF*N_PULSES clocks; done pulses
// in the clock in which th falls.
// The Track/Hold and clock-burst scheme is the readout's; the pulse count of
// 48 follows from 480 pads per column read by ten DiLogic chips. The setup
// time, pulse width and the exact position of the edges are this design's
// own choice.
module gassiplex_ctrl #(
  parameter int unsigned N_PULSES   = 48,
  parameter int unsigned PULSE_HALF = 2,
  parameter int unsigned HOLD_SETUP = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic th,
  output logic gclk,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW} state_e;
  state_e      state;
  logic [15:0] tmr;
  logic [15:0] pulses;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tmr    <= '0;
      pulses <= '0;
      th     <= 1'b0;
      gclk   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          th     <= 1'b1;
          tmr    <= 16'(HOLD_SETUP);
          pulses <= '0;
          state  <= S_SETUP;
        end
        S_SETUP: begin
          if (tmr <= 16'd1) begin
            gclk  <= 1'b1;
            tmr   <= 16'(PULSE_HALF);
            state <= S_HIGH;
          end else tmr <= tmr - 1'b1;
        end
        S_HIGH: begin
          if (tmr <= 16'd1) begin
            gclk   <= 1'b0;
            tmr    <= 16'(PULSE_HALF);
            pulses <= pulses + 1'b1;
            state  <= S_LOW;
          end else tmr <= tmr - 1'b1;
        end
        S_LOW: begin
          if (tmr <= 16'd1) begin
            if (pulses == 16'(N_PULSES)) begin
              th    <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              gclk  <= 1'b1;
              tmr   <= 16'(PULSE_HALF);
              state <= S_HIGH;
            end
          end else tmr <= tmr - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
