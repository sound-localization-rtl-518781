// tb_sound_localizer_avg: the whole localizer at reduced size with spectrum
// averaging over two chunks (T_SNAP = 2).
//
// N = 64-point chunks, SCK_HALF = 2 and a nominal 12.5 MHz clock (so the
// sample rate is still 48.828 kHz and the steering table is unchanged in
// physical terms). The microphones hear a tone on bin 4 (3052 Hz) from
// +20 degrees plus independent random noise on every microphone. Checked:
// every chunk is processed (chunks_done), a result comes only after every
// second chunk, each result is bin 4 and +20 degrees (within 1 degree),
// and no chunk is lost.
module tb_sound_localizer_avg;
  import sl_pkg::*;
  localparam int  N = 64, K_BIN = 4, SCK_HALF = 2, T_SNAP = 2;
  localparam real PI = 3.14159265358979323846;
  localparam real D = 0.04, C = 343.0, FS = 12.5e6 / (128.0 * SCK_HALF);

  logic clk = 0, rst = 1, test_mode = 0;
  logic sck, ws;
  logic [N_PAIRS-1:0] sd;
  logic pcm_valid;
  logic [N_MICS-1:0][I2S_W-1:0] pcm_data;
  logic busy, doa_valid, spec_valid;
  logic [7:0] doa_angle_idx, spec_idx;
  logic signed [15:0] doa_angle_deg;
  logic [60:0] doa_power, spec_pow;
  logic [5:0] peak_bin;
  logic [15:0] overflows, chunks_done;
  int checks = 0, failures = 0;

  sound_localizer #(.SCK_HALF(SCK_HALF), .CLK_HZ(12.5e6), .N(N), .T_SNAP(T_SNAP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int          frame = 0;
  logic [23:0] word [N_MICS];

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_mic
    inmp441_pair_model u_mic (.sck, .ws, .left_word(word[2*p]), .right_word(word[2*p+1]), .sd(sd[p]));
  end

  always @(negedge ws) begin
    for (int i = 0; i < N_MICS; i++) begin
      real tau, v;
      tau = i * D * $sin(20.0 * PI / 180.0) / C * FS;
      v   = 2.0e6 * $cos(2.0 * PI * K_BIN * (frame - tau) / N) + ($urandom_range(800000) - 400000.0);
      word[i] <= 24'($rtoi(v));
    end
    frame++;
  end

  int results = 0;
  always @(posedge clk) if (!rst && doa_valid) begin
    results++;
    check(peak_bin == 6'(K_BIN), $sformatf("peak bin %0d", peak_bin));
    check(doa_angle_deg >= 19 && doa_angle_deg <= 21, $sformatf("angle %0d", doa_angle_deg));
    check(int'(chunks_done) + 1 == T_SNAP * results, $sformatf("result after chunk %0d", chunks_done + 1));
    $display("result %0d: %0d degrees after %0d chunks", results, doa_angle_deg, chunks_done + 1);
  end

  initial begin
    for (int i = 0; i < N_MICS; i++) word[i] = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (results == 3);
    repeat (20) @(posedge clk);
    check(chunks_done == 6, $sformatf("%0d chunks processed", chunks_done));
    check(overflows == 0, "no chunk lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
