// rf_top: the two register files of this design side by side.
//
// 1. The emulated multi-port register file (sr_mpompu_rf): a homogeneous
//    register file for one processor, e.g. a wide VLIW core. Defaults:
//    64-bit x 512 words, base 3 read / 2 write ports pumped 6x, giving
//    18 read and 12 write ports per processor cycle.
// 2. The heterogeneous register file (hrf): one register file shared by
//    four processing elements (PEs) with different clocks, widths, register
//    counts and port counts, each port with its own pumping factor.
//
// The two are independent and have their own register-file clocks. The
// processing elements and the clock manager (DCM/PLL) that derives their
// phase-aligned slower clocks are outside this design: a PE appears here
// only through its load strobes and lane buses. All ports are plain arrays,
// exactly as on the two register files; see their headers for the timing.
module rf_top #(
  // emulated register file
  parameter int unsigned     ERF_W     = 64,
  parameter int unsigned     ERF_DEPTH = 512,
  parameter int unsigned     ERF_NR    = 3,
  parameter int unsigned     ERF_NW    = 2,
  parameter int unsigned     ERF_MPUF  = 6,
  // heterogeneous register file
  parameter int unsigned     HRF_NB = 2,
  parameter int unsigned     HRF_NR = 4,
  parameter int unsigned     HRF_BANK_W   [rf_pkg::MAX_PORTS] = '{0: 32, 1: 8, default: 0},
  parameter int unsigned     HRF_BANK_H   [rf_pkg::MAX_PORTS] = '{0: 64, 1: 64, default: 0},
  parameter rf_pkg::endian_e HRF_W_ENDIAN [rf_pkg::MAX_PORTS] = '{default: rf_pkg::ENDIAN_LITTLE},
  parameter rf_pkg::endian_e HRF_R_ENDIAN [rf_pkg::MAX_PORTS] = '{default: rf_pkg::ENDIAN_LITTLE},
  parameter int unsigned     HRF_R_MPUF   [rf_pkg::MAX_PORTS] = '{0: 3, 1: 2, 2: 1, 3: 4, default: 1},
  parameter int unsigned     HRF_W_MPUF   [rf_pkg::MAX_PORTS] = '{0: 2, 1: 1, default: 1},
  localparam int unsigned    ERF_AW   = $clog2(ERF_DEPTH),
  localparam int unsigned    HRF_DW   = rf_pkg::max_of(HRF_BANK_W, HRF_NB),
  localparam int unsigned    HRF_RAW  = rf_pkg::clog2_min1(rf_pkg::bank_base(HRF_BANK_H, HRF_NB)),
  localparam int unsigned    HRF_WAW  = rf_pkg::clog2_min1(rf_pkg::max_of(HRF_BANK_H, HRF_NB)),
  localparam int unsigned    HRF_MAXF =
      (rf_pkg::max_of(HRF_R_MPUF, HRF_NR) > rf_pkg::max_of(HRF_W_MPUF, HRF_NB))
      ? rf_pkg::max_of(HRF_R_MPUF, HRF_NR) : rf_pkg::max_of(HRF_W_MPUF, HRF_NB)
) (
  // emulated register file
  input  logic               erf_clk,
  input  logic               erf_rst,
  input  logic               erf_ld,
  input  logic [ERF_AW-1:0]  erf_addr_r [ERF_NR][ERF_MPUF],
  output logic [ERF_W-1:0]   erf_data_r [ERF_NR][ERF_MPUF],
  input  logic [ERF_AW-1:0]  erf_addr_w [ERF_NW][ERF_MPUF],
  input  logic [ERF_W-1:0]   erf_data_w [ERF_NW][ERF_MPUF],
  input  logic               erf_we_w   [ERF_NW][ERF_MPUF],
  // heterogeneous register file
  input  logic               hrf_clk,
  input  logic               hrf_rst,
  input  logic               hrf_load_r [HRF_NR],
  input  logic [HRF_RAW-1:0] hrf_addr_r [HRF_NR][HRF_MAXF],
  output logic [HRF_DW-1:0]  hrf_do_r   [HRF_NR][HRF_MAXF],
  input  logic               hrf_load_w [HRF_NB],
  input  logic [HRF_WAW-1:0] hrf_addr_w [HRF_NB][HRF_MAXF],
  input  logic [HRF_DW-1:0]  hrf_di_w   [HRF_NB][HRF_MAXF],
  input  logic               hrf_we_w   [HRF_NB][HRF_MAXF]
);

  sr_mpompu_rf #(
    .W(ERF_W), .DEPTH(ERF_DEPTH), .NR(ERF_NR), .NW(ERF_NW), .MPUF(ERF_MPUF)
  ) u_erf (
    .clk       (erf_clk),
    .rst       (erf_rst),
    .ld        (erf_ld),
    .addr_r    (erf_addr_r),
    .data_out_r(erf_data_r),
    .addr_w    (erf_addr_w),
    .data_in_w (erf_data_w),
    .we_w      (erf_we_w)
  );

  hrf #(
    .NB(HRF_NB), .NR(HRF_NR), .BANK_W(HRF_BANK_W), .BANK_H(HRF_BANK_H),
    .W_ENDIAN(HRF_W_ENDIAN), .R_ENDIAN(HRF_R_ENDIAN),
    .R_MPUF(HRF_R_MPUF), .W_MPUF(HRF_W_MPUF)
  ) u_hrf (
    .clk   (hrf_clk),
    .rst   (hrf_rst),
    .load_r(hrf_load_r),
    .addr_r(hrf_addr_r),
    .do_r  (hrf_do_r),
    .load_w(hrf_load_w),
    .addr_w(hrf_addr_w),
    .di_w  (hrf_di_w),
    .we_w  (hrf_we_w)
  );

endmodule
