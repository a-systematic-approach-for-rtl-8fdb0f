// hrf: heterogeneous register file with per-port shift-register
// multi-pumping.
//
// A single register file shared by processing elements (PEs) that differ in
// clock rate, word width, number of registers, number of ports and
// endianness. The base file (hrf_base) gives each writing PE its own bank
// and lets every read port see all banks. Each physical port then gets its
// own multi-pumping factor: a PE whose clock period is N register-file
// cycles drives a port with N lanes, which a PISO/SIPO pair serialises onto
// the one physical port (mpu_read_port, mpu_write_port). A port with factor
// 1 is wired straight to the base file and runs at the register-file clock.
// Several physical ports may serve one PE; they must then share its factor.
//
// Interface: `clk` is the register-file clock. Every PE clock is an exact,
// phase-aligned division of it. For port p with factor N the PE raises
// `load_r[p]` / `load_w[p]` in the first register-file cycle of each of its
// own cycles, with all N lanes presented; lane x is carried out in
// register-file cycle x, and the N read results are all valid in cycle N-1,
// which the PE samples at its next clock edge. Lanes at or above a port's
// factor are ignored (their read outputs are zero). Write addresses are
// local to the port's bank; read addresses are global. Data buses are DW
// bits wide; a write port uses the low BANK_W bits.
//
// Defaults: the four-PE system of the document's overview figure. PE0 reads
// through one port pumped 3x; PE1 reads and writes through ports pumped 2x
// (two reads and two writes per PE cycle); PE2 reads and writes at the
// register-file clock; PE3 reads through one port pumped 4x. Banks: PE1 owns
// 64 32-bit registers, PE2 64 8-bit registers (the word widths and heights
// of the document's three-PE evaluation system), 128 words in all.
module hrf #(
  parameter int unsigned     NB = 2,
  parameter int unsigned     NR = 4,
  parameter int unsigned     BANK_W   [rf_pkg::MAX_PORTS] = '{0: 32, 1: 8, default: 0},
  parameter int unsigned     BANK_H   [rf_pkg::MAX_PORTS] = '{0: 64, 1: 64, default: 0},
  parameter rf_pkg::endian_e W_ENDIAN [rf_pkg::MAX_PORTS] = '{default: rf_pkg::ENDIAN_LITTLE},
  parameter rf_pkg::endian_e R_ENDIAN [rf_pkg::MAX_PORTS] = '{default: rf_pkg::ENDIAN_LITTLE},
  parameter int unsigned     R_MPUF   [rf_pkg::MAX_PORTS] = '{0: 3, 1: 2, 2: 1, 3: 4, default: 1},
  parameter int unsigned     W_MPUF   [rf_pkg::MAX_PORTS] = '{0: 2, 1: 1, default: 1},
  localparam int unsigned    HT   = rf_pkg::bank_base(BANK_H, NB),
  localparam int unsigned    DW   = rf_pkg::max_of(BANK_W, NB),
  localparam int unsigned    RAW  = rf_pkg::clog2_min1(HT),
  localparam int unsigned    WAW  = rf_pkg::clog2_min1(rf_pkg::max_of(BANK_H, NB)),
  localparam int unsigned    MAXF = (rf_pkg::max_of(R_MPUF, NR) > rf_pkg::max_of(W_MPUF, NB))
                                    ? rf_pkg::max_of(R_MPUF, NR) : rf_pkg::max_of(W_MPUF, NB)
) (
  input  logic           clk,     // register-file clock (CLKRF)
  input  logic           rst,
  // read ports: [physical port][lane]
  input  logic           load_r [NR],
  input  logic [RAW-1:0] addr_r [NR][MAXF],
  output logic [DW-1:0]  do_r   [NR][MAXF],
  // write ports: [physical port = bank][lane]
  input  logic           load_w [NB],
  input  logic [WAW-1:0] addr_w [NB][MAXF],
  input  logic [DW-1:0]  di_w   [NB][MAXF],
  input  logic           we_w   [NB][MAXF]
);

  logic [RAW-1:0] rf_raddr [NR];
  logic [DW-1:0]  rf_rdata [NR];
  logic           rf_we    [NB];
  logic [WAW-1:0] rf_waddr [NB];
  logic [DW-1:0]  rf_wdata [NB];

  for (genvar p = 0; p < NR; p++) begin : g_rd
    localparam int unsigned N = R_MPUF[p];

    if (N == 0 || N > MAXF) begin : g_bad
      $error("hrf: read port %0d has an invalid multi-pumping factor", p);
    end

    logic [RAW-1:0] lane_addr [N];
    logic [DW-1:0]  lane_data [N];

    for (genvar x = 0; x < MAXF; x++) begin : g_lane
      if (x < N) begin : g_used
        assign lane_addr[x] = addr_r[p][x];
        assign do_r[p][x]   = lane_data[x];
      end else begin : g_unused
        assign do_r[p][x]   = '0;
      end
    end

    mpu_read_port #(.AW(RAW), .DW(DW), .N(N)) u_port (
      .clk, .rst,
      .ld     (load_r[p]),
      .rd_addr(lane_addr),
      .rd_data(lane_data),
      .rf_addr(rf_raddr[p]),
      .rf_data(rf_rdata[p])
    );
  end

  for (genvar p = 0; p < NB; p++) begin : g_wr
    localparam int unsigned N = W_MPUF[p];

    if (N == 0 || N > MAXF) begin : g_bad
      $error("hrf: write port %0d has an invalid multi-pumping factor", p);
    end

    logic [WAW-1:0] lane_addr [N];
    logic [DW-1:0]  lane_data [N];
    logic           lane_we   [N];

    for (genvar x = 0; x < N; x++) begin : g_lane
      assign lane_addr[x] = addr_w[p][x];
      assign lane_data[x] = di_w[p][x];
      assign lane_we[x]   = we_w[p][x];
    end

    mpu_write_port #(.AW(WAW), .DW(DW), .N(N)) u_port (
      .clk, .rst,
      .ld     (load_w[p]),
      .wr_addr(lane_addr),
      .wr_data(lane_data),
      .wr_en  (lane_we),
      .rf_addr(rf_waddr[p]),
      .rf_data(rf_wdata[p]),
      .rf_we  (rf_we[p])
    );
  end

  hrf_base #(
    .NB(NB), .NR(NR), .BANK_W(BANK_W), .BANK_H(BANK_H),
    .W_ENDIAN(W_ENDIAN), .R_ENDIAN(R_ENDIAN)
  ) u_base (
    .clk,
    .we   (rf_we),
    .waddr(rf_waddr),
    .wdata(rf_wdata),
    .raddr(rf_raddr),
    .rdata(rf_rdata)
  );

endmodule
