// tb_rf_top: end-to-end test of rf_top, with big-endian HRF ports.
//
// Both register files run at once on their own clocks. The emulated file
// (64-bit x 512, base 3R&2W pumped 6x) is filled through its twelve write
// ports and then receives random processor cycles of 18 reads and 12 writes;
// its reference model serves lane 0..5 in order, reads before writes in each
// lane, and every read is checked in the last inner cycle of the processor
// cycle. Writes outside a port's bank are also issued and must be dropped.
// The heterogeneous file serves four PEs whose clocks are modelled by load
// strobes every 3, 2, 1 and 4 register-file cycles (write ports every 2 and
// 1); its reference model works cycle by cycle, per lane, with sign
// extension of the 8-bit bank and the configured endianness of each port.
// Each mechanism must occur at least once: multi-pumped windows on both
// files, same-window write-then-read on both, dropped out-of-bank writes,
// cross-PE reads, sign extension, the unpumped 1x ports, and the byte-swapped and bit-reversed endianness connections.
module tb_rf_top;
  import rf_pkg::*;
  // emulated register file (defaults)
  localparam int EW = 64, ED = 512, ENR = 3, ENW = 2, EF = 6, EAW = 9, EHALF = 256;
  // heterogeneous register file (defaults)
  localparam int NB = 2, NR = 4, DW = 32, RAW = 7, WAW = 6, MAXF = 4;
  localparam int RN [NR] = '{3, 2, 1, 4};
  localparam int WN [NB] = '{2, 1};
  localparam bit W0_BYTESWAP = 1, W1_BITREV = 1, R3_BITREV = 1;

  logic               erf_clk = 1'b0, erf_rst, erf_ld;
  logic [EAW-1:0]     erf_addr_r [ENR][EF];
  logic [EW-1:0]      erf_data_r [ENR][EF];
  logic [EAW-1:0]     erf_addr_w [ENW][EF];
  logic [EW-1:0]      erf_data_w [ENW][EF];
  logic               erf_we_w   [ENW][EF];
  logic               hrf_clk = 1'b0, hrf_rst;
  logic               hrf_load_r [NR];
  logic [RAW-1:0]     hrf_addr_r [NR][MAXF];
  logic [DW-1:0]      hrf_do_r   [NR][MAXF];
  logic               hrf_load_w [NB];
  logic [WAW-1:0]     hrf_addr_w [NB][MAXF];
  logic [DW-1:0]      hrf_di_w   [NB][MAXF];
  logic               hrf_we_w   [NB][MAXF];

  int checks = 0, failures = 0;
  // mechanism counters
  int m_erf_windows = 0, m_erf_fwd = 0, m_erf_drop = 0;
  int m_hrf_windows = 0, m_hrf_fwd = 0, m_cross = 0, m_sext = 0, m_direct = 0;
  int m_byteswap = 0, m_bitrev_w = 0, m_bitrev_r = 0;
  bit erf_done = 0, hrf_done = 0;

  rf_top #(
    .HRF_W_ENDIAN('{0: ENDIAN_BIG_BYTE, 1: ENDIAN_BIG_BIT, default: ENDIAN_LITTLE}),
    .HRF_R_ENDIAN('{3: ENDIAN_BIG_BIT, default: ENDIAN_LITTLE})
  ) dut (.*);

  always #5 erf_clk = ~erf_clk;
  always #3 hrf_clk = ~hrf_clk;

  initial begin
    repeat (40000) @(posedge erf_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ ERF
  logic [EW-1:0] erf_mem [ED];

  // write port p owns bank ENW-1-p
  function automatic int erf_lo(input int p);
    return (ENW - 1 - p) * EHALF;
  endfunction

  task automatic erf_window(input bit fill, input int fidx, input bit check);
    logic [EAW-1:0] ar [ENR][EF];
    logic [EW-1:0]  ex [ENR][EF];
    bit             wrote [ED];
    for (int a = 0; a < ED; a++) wrote[a] = 0;
    for (int c = 0; c < EF; c++) begin
      @(negedge erf_clk);
      erf_ld = (c == 0);
      if (c == 0) begin
        for (int j = 0; j < ENR; j++) for (int x = 0; x < EF; x++) begin
          ar[j][x] = EAW'($urandom);
          erf_addr_r[j][x] = ar[j][x];
        end
        for (int j = 0; j < ENW; j++) for (int x = 0; x < EF; x++) begin
          if (fill) begin
            erf_addr_w[j][x] = EAW'(erf_lo(j) + (fidx * EF + x) % EHALF);
            erf_we_w[j][x]   = 1'b1;
          end else begin
            erf_we_w[j][x]   = ($urandom % 3) != 0;
            if ($urandom % 10 == 0) erf_addr_w[j][x] = EAW'($urandom);
            else erf_addr_w[j][x] = EAW'(erf_lo(j) + $urandom % EHALF);
          end
          erf_data_w[j][x] = {$urandom, $urandom};
        end
        for (int x = 0; x < EF; x++) begin
          for (int j = 0; j < ENR; j++) begin
            ex[j][x] = erf_mem[ar[j][x]];
            if (check && wrote[ar[j][x]]) m_erf_fwd++;
          end
          for (int j = 0; j < ENW; j++) if (erf_we_w[j][x]) begin
            int a;
            a = int'(erf_addr_w[j][x]);
            if (a >= erf_lo(j) && a < erf_lo(j) + EHALF) begin
              erf_mem[a] = erf_data_w[j][x];
              wrote[a] = 1;
            end else m_erf_drop++;
          end
        end
      end
      if (c == EF - 1 && check) begin
        #1;
        m_erf_windows++;
        for (int j = 0; j < ENR; j++) for (int x = 0; x < EF; x++) begin
          checks++;
          if (erf_data_r[j][x] !== ex[j][x]) begin
            failures++;
            $display("ERF port %0d lane %0d addr %0d: got %h expected %h",
                     j, x, ar[j][x], erf_data_r[j][x], ex[j][x]);
          end
        end
      end
    end
  endtask

  initial begin
    erf_rst = 1; erf_ld = 0;
    for (int j = 0; j < ENR; j++) for (int x = 0; x < EF; x++) erf_addr_r[j][x] = '0;
    for (int j = 0; j < ENW; j++) for (int x = 0; x < EF; x++) begin
      erf_addr_w[j][x] = '0; erf_data_w[j][x] = '0; erf_we_w[j][x] = 0;
    end
    repeat (2) @(negedge erf_clk);
    erf_rst = 0;
    for (int i = 0; i < (EHALF + EF - 1) / EF; i++) erf_window(1, i, 0);
    // keep the processor clock running until the other file has finished too
    for (int i = 0; !(erf_done && hrf_done); i++) begin
      erf_window(0, 0, 1);
      if (i + 1 >= 300) erf_done = 1;
    end
  end

  // ------------------------------------------------------------------ HRF
  logic [31:0] mem0 [64];
  logic [7:0]  mem1 [64];
  bit          v0 [64], v1 [64];
  int          wtime [128];
  logic [DW-1:0] exp_r [NR][MAXF];
  bit            exp_v [NR][MAXF];
  int            win_start [NR];

  function automatic logic [31:0] bitrev32(input logic [31:0] v);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  function automatic logic [7:0] bitrev8(input logic [7:0] v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = v[7-i];
    return r;
  endfunction

  initial begin
    hrf_rst = 1;
    for (int p = 0; p < NR; p++) begin
      hrf_load_r[p] = 0;
      for (int x = 0; x < MAXF; x++) hrf_addr_r[p][x] = '0;
    end
    for (int q = 0; q < NB; q++) begin
      hrf_load_w[q] = 0;
      for (int x = 0; x < MAXF; x++) begin hrf_addr_w[q][x] = '0; hrf_di_w[q][x] = '0; hrf_we_w[q][x] = 0; end
    end
    for (int a = 0; a < 64; a++) begin v0[a] = 0; v1[a] = 0; end
    for (int a = 0; a < 128; a++) wtime[a] = -1;
    repeat (2) @(negedge hrf_clk);
    hrf_rst = 0;
    for (int t = 0; !(erf_done && hrf_done); t++) begin
      if (t >= 3000) hrf_done = 1;
      @(negedge hrf_clk);
      for (int p = 0; p < NR; p++) begin
        hrf_load_r[p] = (t % RN[p]) == 0;
        if (hrf_load_r[p]) begin
          win_start[p] = t;
          for (int x = 0; x < RN[p]; x++) hrf_addr_r[p][x] = RAW'($urandom);
        end
      end
      for (int q = 0; q < NB; q++) begin
        hrf_load_w[q] = (t % WN[q]) == 0;
        if (hrf_load_w[q]) for (int x = 0; x < WN[q]; x++) begin
          hrf_addr_w[q][x] = WAW'($urandom);
          hrf_di_w[q][x]   = $urandom;
          hrf_we_w[q][x]   = (t < 200) || ($urandom % 2 == 1);
        end
      end
      for (int p = 0; p < NR; p++) begin
        int x, a;
        logic [31:0] e;
        x = t % RN[p];
        a = int'(hrf_addr_r[p][x]);
        if (a < 64) begin exp_v[p][x] = v0[a]; e = mem0[a]; end
        else begin exp_v[p][x] = v1[a-64]; e = {{24{mem1[a-64][7]}}, mem1[a-64]}; end
        if (p == 3 && R3_BITREV) e = bitrev32(e);
        exp_r[p][x] = e;
        if (exp_v[p][x] && wtime[a] >= win_start[p]) m_hrf_fwd++;
        if (RN[p] == 1 && exp_v[p][x]) m_direct++;
      end
      #1;
      for (int p = 0; p < NR; p++) if (t % RN[p] == RN[p] - 1) begin
        if (RN[p] > 1) m_hrf_windows++;
        for (int x = 0; x < RN[p]; x++) if (exp_v[p][x]) begin
          int a;
          a = int'(hrf_addr_r[p][x]);
          checks++;
          if (hrf_do_r[p][x] !== exp_r[p][x]) begin
            failures++;
            $display("HRF t=%0d read port %0d lane %0d addr %0d: got %h expected %h",
                     t, p, x, a, hrf_do_r[p][x], exp_r[p][x]);
          end
          if ((p == 1 && a >= 64) || (p == 2 && a < 64) || p == 0 || p == 3) m_cross++;
          if (a >= 64 && mem1[a-64][7]) m_sext++;
          if (p == 3 && R3_BITREV) m_bitrev_r++;
        end
      end
      begin
        int x;
        x = t % WN[0];
        if (hrf_we_w[0][x]) begin
          mem0[hrf_addr_w[0][x]] = W0_BYTESWAP ? {hrf_di_w[0][x][7:0], hrf_di_w[0][x][15:8],
                                                  hrf_di_w[0][x][23:16], hrf_di_w[0][x][31:24]}
                                               : hrf_di_w[0][x];
          if (W0_BYTESWAP) m_byteswap++;
          v0[hrf_addr_w[0][x]] = 1; wtime[hrf_addr_w[0][x]] = t;
        end
        x = t % WN[1];
        if (hrf_we_w[1][x]) begin
          mem1[hrf_addr_w[1][x]] = W1_BITREV ? bitrev8(hrf_di_w[1][x][7:0]) : hrf_di_w[1][x][7:0];
          if (W1_BITREV) m_bitrev_w++;
          v1[hrf_addr_w[1][x]] = 1; wtime[64 + hrf_addr_w[1][x]] = t;
          m_direct++;
        end
      end
    end
  end

  // ------------------------------------------------------------------ end
  initial begin
    wait (erf_done && hrf_done);
    check_seen("ERF multi-pumped windows", m_erf_windows);
    check_seen("ERF same-window write-then-read", m_erf_fwd);
    check_seen("ERF dropped out-of-bank writes", m_erf_drop);
    check_seen("HRF multi-pumped read windows", m_hrf_windows);
    check_seen("HRF same-window write-then-read", m_hrf_fwd);
    check_seen("HRF cross-PE reads", m_cross);
    check_seen("HRF sign-extended reads", m_sext);
    check_seen("HRF unpumped (1x) port accesses", m_direct);
    if (W0_BYTESWAP) check_seen("HRF byte-swapped writes", m_byteswap);
    if (W1_BITREV)   check_seen("HRF bit-reversed writes", m_bitrev_w);
    if (R3_BITREV)   check_seen("HRF bit-reversed reads", m_bitrev_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(input string what, input int n);
    checks++;
    $display("%-36s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask
endmodule
