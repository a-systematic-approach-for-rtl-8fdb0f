// tb_hrf_base: self-checking test of the base heterogeneous register file.
//
// Three banks of different width and height, deliberately not aligned to
// their size: 16 bits x 8 words at 0..7, 8 bits x 16 words at 8..23 and
// 12 bits x 4 words at 24..27, so the global space is 28 words with a 5-bit
// read address and addresses 28..31 out of range. Write port 1 is
// big-endian (bit-reversed bus), read port 1 byte-swapped. Every cycle each
// write port writes a random local address and each read port reads a random
// global address. The reference model stores words as the file does
// (little-endian), and on a read sign-extends the bank's word to 16 bits and
// reorders it for the port. Sign extension of a negative narrow word, each
// endianness path and out-of-range reads are counted and must all occur.
module tb_hrf_base;
  import rf_pkg::*;
  localparam int NB = 3, NR = 2, DW = 16, RAW = 5, WAW = 4;
  localparam int unsigned BW [3] = '{16, 8, 12};
  localparam int unsigned BH [3] = '{8, 16, 4};
  localparam int unsigned BB [3] = '{0, 8, 24};

  logic           clk = 1'b0;
  logic           we    [NB];
  logic [WAW-1:0] waddr [NB];
  logic [DW-1:0]  wdata [NB];
  logic [RAW-1:0] raddr [NR];
  logic [DW-1:0]  rdata [NR];

  logic [DW-1:0]  ref_mem [NB][16];   // stored (little-endian) words
  bit             valid   [NB][16];
  int checks = 0, failures = 0, n_sext = 0, n_oob = 0, n_bitrev = 0, n_byteswap = 0;

  hrf_base #(
    .NB(NB), .NR(NR),
    .BANK_W('{0: 16, 1: 8, 2: 12, default: 0}),
    .BANK_H('{0: 8, 1: 16, 2: 4, default: 0}),
    .W_ENDIAN('{1: ENDIAN_BIG_BIT, default: ENDIAN_LITTLE}),
    .R_ENDIAN('{1: ENDIAN_BIG_BYTE, default: ENDIAN_LITTLE})
  ) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] rev_bits(input logic [DW-1:0] v, input int w);
    logic [DW-1:0] r;
    r = '0;
    for (int i = 0; i < w; i++) r[i] = v[w-1-i];
    return r;
  endfunction

  function automatic logic [DW-1:0] sext(input logic [DW-1:0] v, input int w);
    logic [DW-1:0] r;
    for (int i = 0; i < DW; i++) r[i] = (i < w) ? v[i] : v[w-1];
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      we[b] = 0; waddr[b] = '0; wdata[b] = '0;
      for (int a = 0; a < 16; a++) valid[b][a] = 0;
    end
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) raddr[r] = RAW'($urandom);
      for (int b = 0; b < NB; b++) begin
        we[b]    = ($urandom % 2) == 1;
        waddr[b] = WAW'($urandom % BH[b]);
        wdata[b] = DW'($urandom);
      end
      #1;
      for (int r = 0; r < NR; r++) begin
        int a, b, la;
        logic [DW-1:0] e;
        a = int'(raddr[r]);
        b = -1;
        for (int k = 0; k < NB; k++) if (a >= int'(BB[k]) && a < int'(BB[k] + BH[k])) b = k;
        if (b < 0) begin
          e = '0;
          n_oob++;
        end else begin
          la = a - int'(BB[b]);
          if (!valid[b][la]) continue;
          e = sext(ref_mem[b][la], BW[b]);
          if (BW[b] < DW && e[DW-1]) n_sext++;
        end
        if (r == 1) begin e = {e[7:0], e[15:8]}; n_byteswap++; end
        checks++;
        if (rdata[r] !== e) begin
          failures++;
          $display("cycle %0d port %0d addr %0d: got %h expected %h", i, r, a, rdata[r], e);
        end
      end
      for (int b = 0; b < NB; b++) if (we[b]) begin
        logic [DW-1:0] v;
        v = wdata[b] & DW'((1 << BW[b]) - 1);
        if (b == 1) begin v = rev_bits(v, BW[b]); n_bitrev++; end
        ref_mem[b][waddr[b]] = v;
        valid[b][waddr[b]]   = 1;
      end
    end
    checks += 4;
    if (n_sext == 0)     begin failures++; $display("no negative narrow word was read"); end
    if (n_oob == 0)      begin failures++; $display("no out-of-range read"); end
    if (n_bitrev == 0)   begin failures++; $display("no big-endian write"); end
    if (n_byteswap == 0) begin failures++; $display("no byte-swapped read"); end
    $display("sign-extended=%0d out-of-range=%0d bit-reversed writes=%0d byte-swapped reads=%0d",
             n_sext, n_oob, n_bitrev, n_byteswap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
