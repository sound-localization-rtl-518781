// inmp441_pair_model: behavioural model (not synthesizable) of two INMP441
// I2S microphones sharing one SD line, one strapped to the left slot (WS
// low) and one to the right slot (WS high).
//
// On each SCK rising edge the model notes WS; a change of WS starts a slot
// and latches the word to send (left_word while WS is low, right_word while
// high). The word goes out MSB first on the SCK falling edges, the first bit
// one SCK period after the WS change (I2S one-bit delay), 24 bits in all; SD
// is low for the rest of the 32-bit slot (the real part leaves it
// high-impedance there, which a pull-down turns into 0).
module inmp441_pair_model (
  input  logic        sck,
  input  logic        ws,
  input  logic [23:0] left_word,
  input  logic [23:0] right_word,
  output logic        sd
);

  int          cnt = 0;
  logic        ws_q = 1'b1;
  logic [23:0] word = '0;

  initial sd = 1'b0;

  always @(posedge sck) begin
    if (ws != ws_q) begin
      cnt  = 0;
      word = ws ? right_word : left_word;
    end else begin
      cnt++;
    end
    ws_q = ws;
  end

  always @(negedge sck) begin
    automatic int nb = cnt + 1;
    sd <= (nb >= 1 && nb <= 24) ? word[24 - nb] : 1'b0;
  end

endmodule
