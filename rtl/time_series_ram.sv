// time_series_ram: the time-series sample memory between the I2S capture
// and the FFT.
//
// One word holds one sample instant of every channel: CH samples of W bits,
// channel 0 in the least significant bits. The memory is DEPTH words deep;
// the design uses it as two banks of one 1024-sample chunk each, so that one
// chunk can be captured while the previous one is being processed (the bank
// is the top address bit; the memory itself knows nothing of banks).
//
// It has one write port and one read port with a registered read (data
// appears the clock after the address), the shape of an FPGA block RAM.
//
// The channel count, sample width and chunk length follow the design; the
// two-bank depth and the port arrangement are this block's own choice.
//
// Ports: clk; we, waddr, wdata (write port); raddr, rdata (read port,
// one-cycle latency). The contents are not reset.
module time_series_ram #(
  parameter int unsigned CH    = 8,
  parameter int unsigned W     = 14,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [CH*W-1:0]   wdata,
  input  logic [AW-1:0]     raddr,
  output logic [CH*W-1:0]   rdata
);

  logic [CH*W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
