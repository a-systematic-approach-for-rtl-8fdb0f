// sdp_ram: simple dual-port RAM, one write port and one read port.
//
// This is the storage primitive every register file here is built from: the
// FPGA block RAM in its simple dual-port mode, where one port only writes and
// the other only reads. A write takes effect at the rising clock edge when
// `we` is high. The read port is asynchronous: `rdata` shows the word at
// `raddr` in the same cycle, so a read issued in the cycle of a write to the
// same word returns the old value.
//
// The document uses the block RAM's simple dual-port mode. The asynchronous
// read is this design's choice: the multi-pumping scheme loads each read
// value into its output shift register at the end of the cycle in which its
// address is presented, and the last value of a pumping window is taken
// straight from the memory, which needs the read data within the cycle. A
// synchronous-read block RAM would add one cycle of latency to every port.
// The contents are not reset.
module sdp_ram #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
