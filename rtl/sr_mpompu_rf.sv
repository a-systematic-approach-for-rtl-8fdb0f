// sr_mpompu_rf: emulated multi-port register file with shift-register
// multi-pumping (SR-MPoMPu RF).
//
// The idea: block RAMs run faster than the logic around them, so a register
// file with NR read and NW write ports, clocked MPUF times faster than the
// processor that uses it, can serve NR*MPUF reads and NW*MPUF writes per
// processor cycle. The base register file (mpo_rf) provides the physical
// ports by banking and replication; every physical port is time-shared by a
// PISO shift register on its inputs and, for reads, a SIPO shift register on
// its output (mpu_read_port, mpu_write_port). Shift registers need only
// two-input multiplexers, so the internal clock does not slow down as MPUF
// grows, unlike a multiplexer/demultiplexer time-share.
//
// Interface: `clk` is the register-file (inner) clock; the processor clock is
// MPUF times slower and phase-aligned with it. Emulated port (j, x) is lane x
// of physical port j. The processor raises `ld` for the first inner cycle of
// each of its cycles, with all requests on the lane inputs. Lane x is served
// in inner cycle x, so within one processor cycle writes and reads are
// ordered by lane, and all NR*MPUF read results are valid together in the
// last inner cycle, ready for the processor's next clock edge. `ld` must
// recur every MPUF inner cycles.
//
// Defaults: a 64-bit, 512-word file with base 3R&2W and MPUF 6, i.e.
// 18 read and 12 write ports, one of the configurations the document
// evaluates.
module sr_mpompu_rf #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned NR    = 3,
  parameter int unsigned NW    = 2,
  parameter int unsigned MPUF  = 6,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld,
  // emulated read ports: [physical port][lane]
  input  logic [AW-1:0] addr_r     [NR][MPUF],
  output logic [W-1:0]  data_out_r [NR][MPUF],
  // emulated write ports: [physical port][lane]
  input  logic [AW-1:0] addr_w     [NW][MPUF],
  input  logic [W-1:0]  data_in_w  [NW][MPUF],
  input  logic          we_w       [NW][MPUF]
);

  logic [AW-1:0] rf_raddr [NR];
  logic [W-1:0]  rf_rdata [NR];
  logic [AW-1:0] rf_waddr [NW];
  logic [W-1:0]  rf_wdata [NW];
  logic          rf_we    [NW];

  for (genvar j = 0; j < NR; j++) begin : g_rd
    mpu_read_port #(.AW(AW), .DW(W), .N(MPUF)) u_port (
      .clk, .rst, .ld,
      .rd_addr(addr_r[j]),
      .rd_data(data_out_r[j]),
      .rf_addr(rf_raddr[j]),
      .rf_data(rf_rdata[j])
    );
  end

  for (genvar j = 0; j < NW; j++) begin : g_wr
    mpu_write_port #(.AW(AW), .DW(W), .N(MPUF)) u_port (
      .clk, .rst, .ld,
      .wr_addr(addr_w[j]),
      .wr_data(data_in_w[j]),
      .wr_en  (we_w[j]),
      .rf_addr(rf_waddr[j]),
      .rf_data(rf_wdata[j]),
      .rf_we  (rf_we[j])
    );
  end

  mpo_rf #(.W(W), .DEPTH(DEPTH), .NR(NR), .NW(NW)) u_base (
    .clk,
    .we   (rf_we),
    .waddr(rf_waddr),
    .wdata(rf_wdata),
    .raddr(rf_raddr),
    .rdata(rf_rdata)
  );

endmodule
