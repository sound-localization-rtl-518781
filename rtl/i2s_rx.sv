// i2s_rx: decodes one I2S data line shared by a pair of INMP441 microphones
// into a 24-bit left word and a 24-bit right word per stereo frame.
//
// The two microphones of a pair share SCK, WS and SD; the one strapped as
// "left" drives SD while WS is low, the other while WS is high. Each channel
// slot is 32 SCK periods. Following the I2S format, the first SCK rising edge
// after a WS change carries no data of the new word (the one-bit I2S delay);
// the next 24 rising edges carry the word MSB first, and the rest of the slot
// is ignored.
//
// A 5-bit bit counter restarts on every WS change and counts the SCK rising
// edges of the slot; a Mealy state machine with the states IDLE, LEFT and
// RIGHT follows WS. Bits whose count lies in 1..24 are shifted in; when bit
// 24 arrives the word is copied to left_data or right_data. After a right
// word that follows a left word of the same frame, valid pulses for one clock
// with both words stable. IDLE waits for the first WS falling edge so that a
// frame is never assembled from a partial slot after reset.
//
// The design follows the described counter (counts to 31 twice per WS period,
// data taken for the first 24 counts) and three-state machine. This block's
// own choices: SD is sampled in the system-clock domain on the sck_rise
// strobe from i2s_clkgen after a two-flop synchronizer, and the bit counter
// is offset by the one-bit I2S delay so that count 0 is the delay bit.
//
// Ports: clk, rst (synchronous, active high); sck_rise (sample strobe), ws
// (word select as driven to the pins), sd (serial data from the pair);
// left_data, right_data (24-bit two's complement words); valid (one-cycle
// pulse per complete frame).
module i2s_rx
  import sl_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             sck_rise,
  input  logic             ws,
  input  logic             sd,
  output logic [I2S_W-1:0] left_data,
  output logic [I2S_W-1:0] right_data,
  output logic             valid
);

  typedef enum logic [1:0] {IDLE, LEFT, RIGHT} state_t;

  state_t           state;
  logic [4:0]       cnt;
  logic             ws_prev;
  logic [1:0]       sd_sync;
  logic [I2S_W-2:0] shreg;      // the bits received so far
  logic [I2S_W-1:0] shreg_nxt;
  logic             new_slot;
  logic [4:0]       bit_idx;
  logic             take_bit, last_bit;

  // Mealy decode of the current strobe
  assign new_slot  = (ws != ws_prev);
  assign bit_idx   = new_slot ? 5'd0 : cnt + 5'd1;
  assign take_bit  = (state != IDLE) && !new_slot && (bit_idx >= 5'd1) && (bit_idx <= 5'(I2S_W));
  assign last_bit  = take_bit && (bit_idx == 5'(I2S_W));
  assign shreg_nxt = {shreg, sd_sync[1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      cnt        <= '0;
      ws_prev    <= 1'b1;
      sd_sync    <= '0;
      shreg      <= '0;
      left_data  <= '0;
      right_data <= '0;
      valid      <= 1'b0;
    end else begin
      sd_sync <= {sd_sync[0], sd};
      valid   <= 1'b0;
      if (sck_rise) begin
        ws_prev <= ws;
        cnt     <= bit_idx;
        if (take_bit) shreg <= shreg_nxt[I2S_W-2:0];
        if (new_slot) begin
          unique case (state)
            IDLE:  if (!ws) state <= LEFT;
            LEFT:  state <= ws ? RIGHT : LEFT;
            RIGHT: state <= ws ? RIGHT : LEFT;
            default: state <= IDLE;
          endcase
        end
        if (last_bit && state == LEFT)  left_data <= shreg_nxt;
        if (last_bit && state == RIGHT) begin
          right_data <= shreg_nxt;
          valid      <= 1'b1;
        end
      end
    end
  end

endmodule
