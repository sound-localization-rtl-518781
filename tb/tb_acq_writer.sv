// tb_acq_writer: chunk capture, truncation, double buffering and overflow.
//
// Frames of random 24-bit words are offered at random intervals with a
// small chunk (CHUNK = 16). Every RAM write is checked against an
// independent model: the data must be the top 14 bits of each word, the
// address must run 0..CHUNK-1 in the bank being filled, and banks must
// alternate. The processing side is modelled as busy for a while after each
// chunk_ready; in one phase it stays busy past the next chunk, which must
// raise overflow, keep the bank and increment overflows.
module tb_acq_writer;
  import sl_pkg::*;
  localparam int CHUNK = 16;
  logic clk = 0, rst = 1;
  logic enable = 1, frame_valid = 0, proc_busy = 0;
  logic [N_MICS-1:0][I2S_W-1:0] frame_data = '0;
  logic ram_we, chunk_ready, chunk_bank, overflow;
  logic [4:0] ram_waddr;
  logic [N_MICS*SAMPLE_W-1:0] ram_wdata;
  logic [15:0] overflows;
  int checks = 0, failures = 0;

  acq_writer #(.CHUNK(CHUNK)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference model
  int exp_idx = 0, exp_bank = 0, n_ready = 0, n_ovf = 0, n_writes = 0;
  bit hold_busy = 0;
  always @(posedge clk) if (!rst) begin
    if (ram_we) begin
      logic [N_MICS*SAMPLE_W-1:0] exp_data;
      for (int m = 0; m < N_MICS; m++) exp_data[m*SAMPLE_W +: SAMPLE_W] = SAMPLE_W'(frame_data[m] >> 10);
      check(ram_wdata == exp_data, "truncated data");
      check(ram_waddr == 5'({exp_bank[0], 4'(exp_idx)}), "write address");
      n_writes++;
      exp_idx = (exp_idx + 1) % CHUNK;
      if (exp_idx == 0) begin
        if (proc_busy) begin
          @(posedge clk);
          check(overflow && !chunk_ready, "overflow reported");
          check(int'(overflows) == n_ovf + 1, "overflow counted");
          n_ovf++;
        end else begin
          @(posedge clk);
          check(chunk_ready && !overflow, "chunk_ready");
          check(chunk_bank == exp_bank[0], "chunk bank");
          exp_bank ^= 1;
          n_ready++;
        end
      end
    end else begin
      check(!chunk_ready && !overflow, "no spurious pulse");
    end
  end

  // processing-side model: busy for 40 clocks after a chunk, or much longer
  always @(posedge clk) begin
    if (chunk_ready && !rst) begin
      proc_busy <= 1;
      fork begin
        repeat (hold_busy ? 600 : 40) @(posedge clk);
        proc_busy <= 0;
      end join_none
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 200; f++) begin
      if (f == 100) hold_busy = 1;
      if (f == 150) hold_busy = 0;
      repeat ($urandom_range(3, 1)) @(posedge clk);
      frame_valid <= 1;
      for (int m = 0; m < N_MICS; m++) frame_data[m] <= 24'($urandom);
      @(posedge clk);
      frame_valid <= 0;
    end
    repeat (5) @(posedge clk);
    check(n_writes == 200, "all frames written");
    check(n_ready >= 6, "chunks completed");
    check(n_ovf >= 1, "overflow exercised");
    $display("chunks %0d overflows %0d", n_ready, n_ovf);
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
