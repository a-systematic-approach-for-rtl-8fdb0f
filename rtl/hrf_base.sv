// hrf_base: base heterogeneous register file (single-pumped).
//
// Each processing element (PE) that writes owns one bank: its local address
// space, with its own word width BANK_W[i] and height BANK_H[i]. A bank is
// NR replicated simple dual-port RAMs, all written by the bank's single write
// port and each read by one read port. Banks are stacked into one global
// address space of HT = sum(BANK_H) words: bank i starts at the sum of the
// heights of the banks before it. A write port addresses only its own bank,
// with a local address of log2(BANK_H[i]) bits, so no PE can overwrite
// another's data. A read port addresses the whole global space with
// ceil(log2(HT)) bits and can read any bank.
//
// Read path, per read port: every bank's copy for this port is read at the
// local address, each result is sign-extended to DW, the widest bank width,
// by repeating its most significant bit, a multiplexer selects the bank that
// holds the global address, and the word is reordered for the port's
// endianness. Write path: the PE's word is reordered for the write port's
// endianness before it reaches the bank. Reads of addresses at or above HT
// return zero.
//
// Timing: writes at the rising edge of `clk`; reads are asynchronous (see
// sdp_ram), so a read returns data in the cycle its address is applied and
// sees a write to the same word only from the next cycle.
//
// Follows the document: per-PE banks of replicated RAMs, global address =
// concatenated local spaces, read width = widest bank, sign extension,
// per-PE endianness, power-of-two bank heights. Choices made here: bank
// selection by comparing the global address with each bank's range (this
// reduces to the document's decoding of upper address bits when banks are
// aligned), zero for out-of-range reads, and bit reversal over the full
// read width for big-endian read ports.
//
// Defaults: two banks, a 32-bit PE with 64 registers and an 8-bit PE with 64
// registers (128 words in all), read by four ports.
module hrf_base #(
  parameter int unsigned     NB = 2,
  parameter int unsigned     NR = 4,
  parameter int unsigned     BANK_W   [rf_pkg::MAX_PORTS] = '{0: 32, 1: 8, default: 0},
  parameter int unsigned     BANK_H   [rf_pkg::MAX_PORTS] = '{0: 64, 1: 64, default: 0},
  parameter rf_pkg::endian_e W_ENDIAN [rf_pkg::MAX_PORTS] = '{default: rf_pkg::ENDIAN_LITTLE},
  parameter rf_pkg::endian_e R_ENDIAN [rf_pkg::MAX_PORTS] = '{default: rf_pkg::ENDIAN_LITTLE},
  localparam int unsigned    HT  = rf_pkg::bank_base(BANK_H, NB),
  localparam int unsigned    DW  = rf_pkg::max_of(BANK_W, NB),
  localparam int unsigned    RAW = rf_pkg::clog2_min1(HT),
  localparam int unsigned    WAW = rf_pkg::clog2_min1(rf_pkg::max_of(BANK_H, NB))
) (
  input  logic           clk,
  // write port i writes bank i; its address is local, its data BANK_W[i] wide
  input  logic           we    [NB],
  input  logic [WAW-1:0] waddr [NB],
  input  logic [DW-1:0]  wdata [NB],
  // read ports address the global space
  input  logic [RAW-1:0] raddr [NR],
  output logic [DW-1:0]  rdata [NR]
);

  // Per bank and read port: the sign-extended word and whether the port's
  // address falls into the bank.
  logic [DW-1:0] ext_data [NB][NR];
  logic          hit      [NB][NR];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    localparam int unsigned BW   = BANK_W[b];
    localparam int unsigned H    = BANK_H[b];
    localparam int unsigned BASE = rf_pkg::bank_base(BANK_H, b);
    localparam int unsigned LAW  = (H > 1) ? $clog2(H) : 1;

    if (H == 0 || (H & (H - 1)) != 0) begin : g_bad_h
      $error("hrf_base: bank %0d height %0d is not a power of two", b, H);
    end
    if (BW == 0 || BW > DW) begin : g_bad_w
      $error("hrf_base: bank %0d width %0d is invalid", b, BW);
    end

    logic [BW-1:0] bank_wdata;

    endian_map #(.W(BW), .MODE(W_ENDIAN[b])) u_wr_endian (
      .a(wdata[b][BW-1:0]),
      .y(bank_wdata)
    );

    for (genvar r = 0; r < NR; r++) begin : g_copy
      logic [BW-1:0]  word;
      logic [RAW:0]   offset;

      assign offset = {1'b0, raddr[r]} - (RAW+1)'(BASE);

      sdp_ram #(.W(BW), .DEPTH(H)) u_ram (
        .clk,
        .we   (we[b]),
        .waddr(waddr[b][LAW-1:0]),
        .wdata(bank_wdata),
        .raddr(offset[LAW-1:0]),
        .rdata(word)
      );

      // Sign extension to the widest bank width.
      assign ext_data[b][r] = DW'(signed'(word));
      // The offset is below H exactly when the address lies in this bank.
      assign hit[b][r]      = (offset < (RAW+1)'(H));
    end
  end

  for (genvar r = 0; r < NR; r++) begin : g_rport
    logic [DW-1:0] sel_data;

    always_comb begin
      sel_data = '0;
      for (int b = 0; b < NB; b++) if (hit[b][r]) sel_data = ext_data[b][r];
    end

    endian_map #(.W(DW), .MODE(R_ENDIAN[r])) u_rd_endian (
      .a(sel_data),
      .y(rdata[r])
    );
  end

endmodule
