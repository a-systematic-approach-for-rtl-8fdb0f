// mpo_rf: multi-port register file built from simple dual-port RAMs by
// banking and replication (the base, single-pumped register file of the
// emulated multi-port register file).
//
// Banking gives write ports: the DEPTH words are split into NW banks and each
// write port owns one bank. Replication gives read ports: every bank holds
// NR identical RAM copies, all written together by the bank's write port,
// and copy r serves read port r. Read port r picks its word from the bank
// that holds the address with an NW-to-one multiplexer.
//
// Partition, as in the document's 512-word, three-write-port example: the
// top S = ceil(log2(NW)) address bits select one of 2^S equal slots; banks
// 0..NW-2 take one slot each and the last bank takes all remaining slots
// (512 words over three banks: 0-127, 128-255, 256-511). Bank j is written
// by write port NW-1-j, the order in which the example is drawn. Each RAM is
// sized to its bank's range instead of a full block RAM.
//
// Write addresses are global. A write port can only reach its own bank; a
// write whose address lies outside it is dropped (the document leaves
// conflict-free allocation to the compiler). Reads are asynchronous (see
// sdp_ram), writes happen at the rising edge, and a read of a word written in
// the same cycle returns the old value, since the document does not guard
// against simultaneous read and write of one location.
module mpo_rf #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned NR    = 3,
  parameter int unsigned NW    = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // write ports
  input  logic          we    [NW],
  input  logic [AW-1:0] waddr [NW],
  input  logic [W-1:0]  wdata [NW],
  // read ports
  input  logic [AW-1:0] raddr [NR],
  output logic [W-1:0]  rdata [NR]
);

  localparam int unsigned SEL  = (NW > 1) ? $clog2(NW) : 0;
  localparam int unsigned SLOT = DEPTH >> SEL;

  function automatic int unsigned base_of(input int unsigned j);
    return j * SLOT;
  endfunction

  function automatic int unsigned height_of(input int unsigned j);
    return (j == NW - 1) ? DEPTH - (NW - 1) * SLOT : SLOT;
  endfunction

  // Bank index holding address a.
  function automatic int unsigned bank_of(input logic [AW-1:0] a);
    int unsigned s;
    s = (SEL == 0) ? 0 : int'(a) / SLOT;
    return (s > NW - 1) ? NW - 1 : s;
  endfunction

  // Read data of every copy: bank j, copy r.
  logic [W-1:0] copy_data [NW][NR];

  for (genvar j = 0; j < NW; j++) begin : g_bank
    localparam int unsigned BASE = base_of(j);
    localparam int unsigned H    = height_of(j);
    localparam int unsigned LAW  = (H > 1) ? $clog2(H) : 1;
    localparam int unsigned WP   = NW - 1 - j;

    logic           bank_we, above_base, below_top;
    logic [LAW-1:0] bank_waddr;

    if (BASE == 0) begin : g_lo
      assign above_base = 1'b1;
    end else begin : g_lo
      assign above_base = waddr[WP] >= AW'(BASE);
    end
    if (BASE + H >= (1 << AW)) begin : g_hi
      assign below_top = 1'b1;
    end else begin : g_hi
      assign below_top = waddr[WP] < AW'(BASE + H);
    end

    assign bank_we    = we[WP] && above_base && below_top;
    assign bank_waddr = LAW'(waddr[WP] - AW'(BASE));

    for (genvar r = 0; r < NR; r++) begin : g_copy
      sdp_ram #(.W(W), .DEPTH(H)) u_ram (
        .clk,
        .we   (bank_we),
        .waddr(bank_waddr),
        .wdata(wdata[WP]),
        .raddr(LAW'(raddr[r] - AW'(BASE))),
        .rdata(copy_data[j][r])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) rdata[r] = copy_data[bank_of(raddr[r])][r];
  end

endmodule
