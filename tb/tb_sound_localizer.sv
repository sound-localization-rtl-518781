// tb_sound_localizer: the whole localizer at its default parameters, from
// microphone bit streams to the reported angle.
//
// Four behavioural microphone pairs drive the SD lines from the design's own
// SCK and WS. Each microphone hears a tone on bin K_BIN of the 1024-point
// FFT (2861 Hz at 48.828 kHz), delayed by i*d*sin(theta)/c for microphone i,
// computed here in double precision; d = 4 cm, c = 343 m/s.
//
// Phases:
//   1. test mode: frames are streamed out and compared word for word with
//      what the microphones sent; more than a chunk of frames passes and
//      none may be processed (bypass);
//   2. normal mode, source at +30 degrees: the first processed chunk must
//      report bin K_BIN and +30 degrees, with all 181 spectrum values;
//   3. the source moves to -40 degrees: a later chunk must report -40.
// The chunk-to-result latency is checked against the budget
// 8*(N + N/2*log2 N + 8) + N/2 + 8 + 181*10 + 8 clocks.
// Each mechanism is counted (frames checked, chunks bypassed in test mode,
// chunks processed, spectrum values, results at each angle) and one that
// never happened counts as a failure.
module tb_sound_localizer;
  import sl_pkg::*;
  localparam int  N = 1024, K_BIN = 60;
  localparam real PI = 3.14159265358979323846;
  localparam real D = 0.04, C = 343.0, FS = 50.0e6 / 1024.0;

  logic clk = 0, rst = 1, test_mode = 1;
  logic sck, ws;
  logic [N_PAIRS-1:0] sd;
  logic pcm_valid;
  logic [N_MICS-1:0][I2S_W-1:0] pcm_data;
  logic busy, doa_valid, spec_valid;
  logic [7:0] doa_angle_idx, spec_idx;
  logic signed [15:0] doa_angle_deg;
  logic [59:0] doa_power, spec_pow;
  logic [9:0] peak_bin;
  logic [15:0] overflows, chunks_done;
  int checks = 0, failures = 0;

  sound_localizer dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- microphones ----------------
  real         theta = 30.0;
  int          frame = 0;
  logic [23:0] word [N_MICS];

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_mic
    inmp441_pair_model u_mic (.sck, .ws, .left_word(word[2*p]), .right_word(word[2*p+1]), .sd(sd[p]));
  end

  function automatic logic [23:0] mic_sample(input int i, input int f);
    real tau;
    tau = i * D * $sin(theta * PI / 180.0) / C * FS;   // delay in samples
    return 24'($rtoi(3.0e6 * $cos(2.0 * PI * K_BIN * (f - tau) / N)));
  endfunction

  always @(negedge ws) begin
    for (int i = 0; i < N_MICS; i++) begin
      word[i] <= mic_sample(i, frame);
    end
    frame++;
  end

  // ---------------- monitors ----------------
  int frames_ok = 0, bypassed = 0, processed = 0, n_spec = 0, res30 = 0, res40 = 0;
  int t_chunk = 0, t_now = 0, tm_frames = 0;
  bit was_busy = 0;

  always @(posedge clk) if (!rst) begin
    t_now++;
    if (pcm_valid && test_mode) begin
      automatic bit ok = 1;
      for (int i = 0; i < N_MICS; i++) if (pcm_data[i] != word[i]) ok = 0;
      check(ok, "streamed frame equals the microphone words");
      if (ok) frames_ok++;
    end
    was_busy <= busy;
    if (busy && !was_busy) t_chunk = t_now - 1;   // chunk_ready precedes busy by one clock
    if (pcm_valid && test_mode) begin
      tm_frames++;
      if (tm_frames == N + 2) bypassed++;          // a whole chunk was captured meanwhile
    end
    if (spec_valid) n_spec++;
    if (test_mode) check(!busy, "no processing in test mode");
    if (doa_valid) begin
      int lat;
      lat = t_now - t_chunk;
      processed++;
      check(lat <= 8 * (N + N / 2 * 10 + 8) + N / 2 + 8 + 181 * 10 + 8, $sformatf("latency %0d", lat));
      check(peak_bin == 10'(K_BIN), $sformatf("peak bin %0d", peak_bin));
      $display("result: %0d degrees, bin %0d, %0d clocks after the chunk (source %0.1f)",
               doa_angle_deg, peak_bin, lat, theta);
      if (doa_angle_deg == 30) res30++;
      if (doa_angle_deg == -40) res40++;
    end
  end

  initial begin
    for (int i = 0; i < N_MICS; i++) word[i] = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    // 1. test mode until one chunk has been captured and bypassed
    wait (bypassed == 1);
    repeat (10) @(posedge clk);
    test_mode <= 0;
    // 2. source at +30 degrees
    wait (processed == 1);
    check(doa_angle_deg == 30, $sformatf("first result %0d, expected 30", doa_angle_deg));
    check(n_spec == 181, $sformatf("%0d spectrum values", n_spec));
    // 3. source moves to -40 degrees; the chunk after the next is clean
    theta = -40.0;
    wait (processed == 3);
    check(doa_angle_deg == -40, $sformatf("result %0d, expected -40", doa_angle_deg));
    check(overflows == 0, "no chunk lost at the default rates");
    check(chunks_done == 16'(processed), "chunks counted");
    // mechanisms
    check(frames_ok > 100, $sformatf("frames streamed in test mode: %0d", frames_ok));
    check(bypassed >= 1, "chunk bypassed in test mode");
    check(processed >= 3, "chunks processed");
    check(res30 >= 1 && res40 >= 1, "results at both source angles");
    $display("frames checked %0d, bypassed chunks %0d, processed chunks %0d, spectrum values %0d",
             frames_ok, bypassed, processed, n_spec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
