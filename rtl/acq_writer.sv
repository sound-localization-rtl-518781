// acq_writer: turns the stream of stereo frames from the four I2S receivers
// into 1024-sample chunks in the time-series RAM.
//
// Each frame brings one 24-bit word per microphone. The writer keeps the 14
// most significant bits of each (the truncation drops the 10 least
// significant bits, keeping the full-scale range) and writes the eight
// 14-bit samples as one RAM word at address {bank, index}. After CHUNK
// frames the chunk is complete: if the processing side is idle, the writer
// pulses chunk_ready with the number of the bank just filled and moves on to
// the other bank (double buffering). If the processing side is still busy
// with the other bank, the chunk just captured is given up, the bank is
// refilled from index 0, and overflow pulses; overflows counts these events.
// While enable is low nothing is written and the index stays at 0.
//
// The 24-to-14-bit truncation and the chunk of 1024 samples follow the
// design. Keeping the most significant bits, the double buffering and the
// overflow policy are this block's own choices.
//
// Ports: clk, rst (synchronous, active high); enable; frame_valid and
// frame_data (eight 24-bit words, microphone 0 first); proc_busy (the
// processing side holds the other bank); RAM write port ram_we, ram_waddr,
// ram_wdata; chunk_ready / chunk_bank (one-cycle pulse); overflow (one-cycle
// pulse) and overflows (saturating count).
module acq_writer
  import sl_pkg::*;
#(
  parameter int unsigned CHUNK = 1024,
  localparam int unsigned IW   = $clog2(CHUNK)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       enable,
  input  logic                       frame_valid,
  input  logic [N_MICS-1:0][I2S_W-1:0] frame_data,
  input  logic                       proc_busy,
  output logic                       ram_we,
  output logic [IW:0]                ram_waddr,
  output logic [N_MICS*SAMPLE_W-1:0] ram_wdata,
  output logic                       chunk_ready,
  output logic                       chunk_bank,
  output logic                       overflow,
  output logic [15:0]                overflows
);

  logic          bank;
  logic [IW-1:0] idx;
  logic          last;

  assign last = (idx == IW'(CHUNK - 1));

  // truncation: keep the SAMPLE_W most significant bits of every word
  always_comb begin
    for (int m = 0; m < N_MICS; m++)
      ram_wdata[m*SAMPLE_W +: SAMPLE_W] = frame_data[m][I2S_W-1 -: SAMPLE_W];
  end
  assign ram_we    = enable && frame_valid;
  assign ram_waddr = {bank, idx};

  always_ff @(posedge clk) begin
    if (rst) begin
      bank        <= 1'b0;
      idx         <= '0;
      chunk_ready <= 1'b0;
      chunk_bank  <= 1'b0;
      overflow    <= 1'b0;
      overflows   <= '0;
    end else begin
      chunk_ready <= 1'b0;
      overflow    <= 1'b0;
      if (!enable) begin
        idx <= '0;
      end else if (frame_valid) begin
        if (!last) begin
          idx <= idx + IW'(1);
        end else begin
          idx <= '0;
          if (proc_busy) begin
            overflow  <= 1'b1;
            if (overflows != '1) overflows <= overflows + 16'd1;
          end else begin
            chunk_ready <= 1'b1;
            chunk_bank  <= bank;
            bank        <= ~bank;
          end
        end
      end
    end
  end

endmodule
