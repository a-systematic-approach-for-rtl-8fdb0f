// tb_hrf: self-checking test of the multi-pumped heterogeneous register file
// in its default four-PE configuration.
//
// Read ports pumped 3x, 2x, 1x and 4x; write ports pumped 2x (the 32-bit PE,
// bank 0, global words 0..63) and 1x (the 8-bit PE, bank 1, words 64..127).
// Each port's PE clock is modelled by its load strobe: port p loads every
// N_p register-file cycles, all ports starting together, so windows of
// different lengths overlap in every combination. The reference model works
// at register-file-cycle granularity: in cycle t, read port p serves lane
// t mod N_p from the addresses of its current window and write port q writes
// lane t mod N_q; reads see the writes of earlier cycles only. A port's N
// read results are checked together in the last cycle of its window.
// Counted and required: reads of the other PE's bank (cross-PE reads),
// sign-extended reads of negative 8-bit words, and reads of a word written
// earlier in the reading port's own window.
module tb_hrf;
  localparam int NB = 2, NR = 4, DW = 32, RAW = 7, WAW = 6, MAXF = 4;
  localparam int RN [NR] = '{3, 2, 1, 4};
  localparam int WN [NB] = '{2, 1};

  logic           clk = 1'b0, rst;
  logic           load_r [NR];
  logic [RAW-1:0] addr_r [NR][MAXF];
  logic [DW-1:0]  do_r   [NR][MAXF];
  logic           load_w [NB];
  logic [WAW-1:0] addr_w [NB][MAXF];
  logic [DW-1:0]  di_w   [NB][MAXF];
  logic           we_w   [NB][MAXF];

  logic [31:0] mem0 [64];
  logic [7:0]  mem1 [64];
  bit          v0 [64], v1 [64];
  int          wtime [128];         // cycle of the last write of each global word
  logic [DW-1:0] exp_r [NR][MAXF];
  bit            exp_v [NR][MAXF];
  int            win_start [NR];
  int checks = 0, failures = 0, n_cross = 0, n_sext = 0, n_fwd = 0;

  hrf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] model_read(input int a, output bit valid);
    if (a < 64) begin valid = v0[a]; return mem0[a]; end
    valid = v1[a-64];
    return {{24{mem1[a-64][7]}}, mem1[a-64]};
  endfunction

  initial begin
    rst = 1;
    for (int p = 0; p < NR; p++) begin
      load_r[p] = 0;
      for (int x = 0; x < MAXF; x++) addr_r[p][x] = '0;
    end
    for (int q = 0; q < NB; q++) begin
      load_w[q] = 0;
      for (int x = 0; x < MAXF; x++) begin addr_w[q][x] = '0; di_w[q][x] = '0; we_w[q][x] = 0; end
    end
    for (int a = 0; a < 64; a++) begin v0[a] = 0; v1[a] = 0; end
    for (int a = 0; a < 128; a++) wtime[a] = -1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // new windows
      for (int p = 0; p < NR; p++) begin
        load_r[p] = (t % RN[p]) == 0;
        if (load_r[p]) begin
          win_start[p] = t;
          for (int x = 0; x < RN[p]; x++) addr_r[p][x] = RAW'($urandom);
        end
      end
      for (int q = 0; q < NB; q++) begin
        load_w[q] = (t % WN[q]) == 0;
        if (load_w[q]) for (int x = 0; x < WN[q]; x++) begin
          addr_w[q][x] = WAW'($urandom);
          di_w[q][x]   = $urandom;
          we_w[q][x]   = (t < 200) || ($urandom % 2 == 1);
        end
      end
      // reads served this cycle
      for (int p = 0; p < NR; p++) begin
        int x, a;
        bit ok;
        x = t % RN[p];
        a = int'(addr_r[p][x]);
        exp_r[p][x] = model_read(a, ok);
        exp_v[p][x] = ok;
        if (ok && wtime[a] >= win_start[p]) n_fwd++;
      end
      // check ports whose window ends in this cycle
      #1;
      for (int p = 0; p < NR; p++) if (t % RN[p] == RN[p] - 1) begin
        for (int x = 0; x < RN[p]; x++) if (exp_v[p][x]) begin
          checks++;
          if (do_r[p][x] !== exp_r[p][x]) begin
            failures++;
            $display("t=%0d read port %0d lane %0d addr %0d: got %h expected %h",
                     t, p, x, addr_r[p][x], do_r[p][x], exp_r[p][x]);
          end
          if ((p == 2) != (int'(addr_r[p][x]) >= 64)) n_cross++;
          if (int'(addr_r[p][x]) >= 64 && exp_r[p][x][31]) n_sext++;
        end
        for (int x = RN[p]; x < MAXF; x++) begin
          checks++;
          if (do_r[p][x] !== '0) begin failures++; $display("unused lane %0d of port %0d not zero", x, p); end
        end
      end
      // writes done at the end of this cycle
      begin
        int x;
        x = t % WN[0];
        if (we_w[0][x]) begin
          mem0[addr_w[0][x]] = di_w[0][x]; v0[addr_w[0][x]] = 1; wtime[addr_w[0][x]] = t;
        end
        x = t % WN[1];
        if (we_w[1][x]) begin
          mem1[addr_w[1][x]] = di_w[1][x][7:0]; v1[addr_w[1][x]] = 1; wtime[64 + addr_w[1][x]] = t;
        end
      end
    end
    checks += 3;
    if (n_cross == 0) begin failures++; $display("no cross-PE read"); end
    if (n_sext == 0)  begin failures++; $display("no sign-extended read"); end
    if (n_fwd == 0)   begin failures++; $display("no read of a word written in the same window"); end
    $display("cross-PE reads=%0d sign-extended=%0d same-window=%0d", n_cross, n_sext, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
