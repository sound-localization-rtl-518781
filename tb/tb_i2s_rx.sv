// tb_i2s_rx: one I2S receiver against a behavioural microphone pair.
//
// i2s_clkgen drives SCK and WS; inmp441_pair_model sends a new random
// left/right word pair every frame. Each time the receiver signals a
// complete frame the decoded words must equal the words the model sent.
// Also checked: one valid per frame after the first full frame, and none
// before the first WS falling edge (IDLE state).
module tb_i2s_rx;
  localparam int SCK_HALF = 2;
  logic clk = 0, rst = 1;
  logic sck, ws, sck_rise, sck_fall, frame_start, sd;
  logic [23:0] lw = '0, rw = '0, left_data, right_data;
  logic valid;
  int checks = 0, failures = 0, frames = 0, valids = 0;

  i2s_clkgen #(.SCK_HALF(SCK_HALF)) u_clk (.*);
  inmp441_pair_model u_mic (.sck, .ws, .left_word(lw), .right_word(rw), .sd);
  i2s_rx dut (.clk, .rst, .sck_rise, .ws, .sd, .left_data, .right_data, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // new words at the start of every frame (WS falling)
  always @(negedge ws) begin
    lw <= 24'($urandom);
    rw <= 24'($urandom);
    frames++;
  end

  always @(posedge clk) if (valid && !rst) begin
    valids++;
    check(left_data == lw, $sformatf("left word %h vs %h", left_data, lw));
    check(right_data == rw, $sformatf("right word %h vs %h", right_data, rw));
  end

  initial begin
    // extreme words first
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2 * SCK_HALF * 64 * 40) @(posedge clk);
    check(valids >= frames - 2 && valids <= frames, $sformatf("one valid per frame (%0d valids, %0d frames)", valids, frames));
    check(valids > 30, "frames decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
