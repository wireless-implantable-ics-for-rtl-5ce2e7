// Successive-approximation register logic of the 10-bit SAR ADC.
//
// One conversion is a binary search over N bits, MSB first. The block first
// holds track high for one step so the track-and-hold follows the amplified
// input. It then sets the trial code to the bits found so far plus the next
// bit at 1, drives it onto the capacitive DAC (dac_ctrl, one switch per
// binary-weighted capacitor: 1 = V_REF, 0 = ground) and, at the end of the
// step, reads the comparator: comp = 1 (held sample above the DAC level)
// keeps the bit, comp = 0 clears it. After N steps the code is complete.
//
// Outputs: every decision is also given as a serial bit (ser_bit, MSB
// first) with ser_valid as its timing information, because the serial
// stream is valid only during the N decision steps of each N+1-step cycle.
// The N bits are gathered into data, with done pulsing for one step.
// Conversions repeat back to back while run is high.
//
// The binary search, N = 10 and the serial or parallel use of the comparator
// decisions follow the design description. The one-step track phase, the
// step enable en (one SAR step per cycle with en high) and the run input are
// this design's choices.
module sar_logic #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // advance one SAR step
  input  logic         run,       // convert continuously
  input  logic         comp,      // comparator: sample > DAC
  output logic         track,     // track-and-hold switch closed
  output logic [N-1:0] dac_ctrl,  // capacitor switch control
  output logic         ser_bit,
  output logic         ser_valid,
  output logic [N-1:0] data,
  output logic         done
);

  typedef enum logic [1:0] {S_IDLE, S_TRACK, S_CONV} state_e;

  localparam int unsigned BW = $clog2(N);

  state_e        state;
  logic [BW-1:0] bit_idx;   // bit under test
  logic [N-1:0]  code;      // bits decided so far

  assign track    = (state == S_TRACK);
  assign dac_ctrl = (state == S_CONV) ? (code | (N'(1) << bit_idx)) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bit_idx   <= '0;
      code      <= '0;
      data      <= '0;
      done      <= 1'b0;
      ser_bit   <= 1'b0;
      ser_valid <= 1'b0;
    end else if (en) begin
      done      <= 1'b0;
      ser_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (run) state <= S_TRACK;
        S_TRACK: begin
          state   <= S_CONV;
          bit_idx <= BW'(N - 1);
          code    <= '0;
        end
        S_CONV: begin
          ser_bit   <= comp;
          ser_valid <= 1'b1;
          if (comp) code[bit_idx] <= 1'b1;
          if (bit_idx == '0) begin
            data  <= code | (comp ? N'(1) : N'(0));
            done  <= 1'b1;
            state <= run ? S_TRACK : S_IDLE;
          end else begin
            bit_idx <= bit_idx - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
