// tb_i2s_clkgen: checks the SCK and WS waveforms of i2s_clkgen.
//
// Measured on every edge: SCK half period = SCK_HALF clocks; WS only
// changes together with an SCK falling edge; WS stays constant for exactly
// 32 SCK periods (so f_SCK = 64 f_WS); sck_rise is high exactly in the first
// clock with SCK high, sck_fall in the first clock with SCK low; frame_start
// coincides with WS going low.
module tb_i2s_clkgen;
  localparam int SCK_HALF = 8;
  logic clk = 0, rst = 1;
  logic sck, ws, sck_rise, sck_fall, frame_start;
  int checks = 0, failures = 0;

  i2s_clkgen #(.SCK_HALF(SCK_HALF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic sck_q, ws_q;
  int   since_sck = 0, sck_falls_in_ws = 0, ws_periods = 0, n_frames = 0;
  bit   started = 0, ws_started = 0;

  always @(posedge clk) if (!rst) begin
    sck_q <= sck;
    ws_q  <= ws;
    since_sck <= since_sck + 1;
    if (sck != sck_q) begin
      if (started) check(since_sck + 1 == SCK_HALF, "SCK half period");
      started   <= 1;
      since_sck <= 0;
      check(sck_rise == (sck && !sck_q), "sck_rise with rising SCK");
      check(sck_fall == (!sck && sck_q), "sck_fall with falling SCK");
      if (!sck) sck_falls_in_ws <= sck_falls_in_ws + 1;
    end else begin
      check(!sck_rise && !sck_fall, "no strobe without an SCK edge");
    end
    if (ws != ws_q) begin
      check(sck_q && !sck, "WS changes with SCK falling");
      if (ws_started) begin
        check(sck_falls_in_ws + 1 == 32 || sck_falls_in_ws == 32, "32 SCK per WS half");
        ws_periods <= ws_periods + 1;
      end
      ws_started <= 1;
      sck_falls_in_ws <= 1;
      check(frame_start == !ws, "frame_start with WS falling");
      if (!ws) n_frames <= n_frames + 1;
    end else begin
      check(!frame_start, "no frame_start without WS edge");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    sck_q = 0; ws_q = 1;
    repeat (2 * SCK_HALF * 64 * 6) @(posedge clk);
    check(n_frames >= 5, "frames produced");
    check(ws_periods >= 10, "WS toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
