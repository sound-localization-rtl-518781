// i2s_clkgen: generates the I2S serial clock (SCK) and word select (WS)
// for the microphone array from the 50 MHz system clock.
//
// A divider counter toggles SCK every SCK_HALF system clocks. A 6-bit slot
// counter advances on each SCK falling edge; WS is its top bit, so WS is low
// for 32 SCK periods (left channel) and high for 32 (right channel), which
// gives f_SCK = 64 x f_WS as the INMP441 stereo format requires. WS changes
// on the SCK falling edge, as in standard I2S.
//
// Besides the pins, the block gives the receivers a one-cycle strobe,
// sck_rise, that is high in the first system-clock cycle in which SCK is
// high: the receivers sample SD on it instead of using SCK as a clock, so the
// whole design stays in the single system-clock domain.
//
// Derived from the design: the division from a 50 MHz clock and the 64:1
// ratio. This block's own choice: SCK_HALF = 8, giving SCK = 3.125 MHz and a
// sample rate of 50 MHz / 1024 = 48.828 kHz; the single-domain strobe; reset
// state SCK = 0, WS = 0.
//
// Ports: clk, rst (synchronous, active high); sck, ws (to the microphones);
// sck_rise, sck_fall (one-cycle strobes); frame_start (one-cycle strobe with
// the SCK falling edge on which WS goes low, i.e. a new stereo frame).
module i2s_clkgen #(
  parameter int unsigned SCK_HALF = 8   // system clocks per SCK half period
) (
  input  logic clk,
  input  logic rst,
  output logic sck,
  output logic ws,
  output logic sck_rise,
  output logic sck_fall,
  output logic frame_start
);

  localparam int unsigned DW = (SCK_HALF > 1) ? $clog2(SCK_HALF) : 1;

  logic [DW-1:0] div_cnt;
  logic [5:0]    slot_cnt;   // SCK periods within a WS period (0..63)
  logic          toggle;

  assign toggle = (div_cnt == DW'(SCK_HALF - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt     <= '0;
      sck         <= 1'b0;
      slot_cnt    <= 6'd63;
      ws          <= 1'b1;
      sck_rise    <= 1'b0;
      sck_fall    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      sck_rise    <= 1'b0;
      sck_fall    <= 1'b0;
      frame_start <= 1'b0;
      if (toggle) begin
        div_cnt <= '0;
        sck     <= ~sck;
        if (sck) begin
          // falling edge: advance the slot position and WS with it
          slot_cnt    <= slot_cnt + 6'd1;
          ws          <= (slot_cnt + 6'd1) >= 6'd32;
          sck_fall    <= 1'b1;
          frame_start <= (slot_cnt == 6'd63);
        end else begin
          sck_rise <= 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + DW'(1);
      end
    end
  end

endmodule
