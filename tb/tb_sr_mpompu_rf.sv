// tb_sr_mpompu_rf: self-checking test of the emulated multi-port register
// file.
//
// Configuration: 16-bit x 64 words, base 2R&2W pumped 3x, i.e. six read and
// six write ports per processor cycle. The processor clock is modelled by
// `ld`, raised every third register-file cycle. After a fill phase, each
// processor cycle issues six random reads and six random writes (each write
// port inside its own bank). The reference model serves lane 0, 1, 2 in
// order: in each step it first answers that lane's reads from its array and
// then applies that lane's writes, so a read in a later lane sees an earlier
// lane's write of the same processor cycle. All six read results are checked
// in the last register-file cycle of the processor cycle, which also checks
// the MPUF-cycle latency. Same-window forwarding is counted and must occur.
module tb_sr_mpompu_rf;
  localparam int W = 16, DEPTH = 64, NR = 2, NW = 2, MPUF = 3, AW = 6;
  localparam int HALF = DEPTH / 2;

  logic          clk = 1'b0, rst, ld;
  logic [AW-1:0] addr_r     [NR][MPUF];
  logic [W-1:0]  data_out_r [NR][MPUF];
  logic [AW-1:0] addr_w     [NW][MPUF];
  logic [W-1:0]  data_in_w  [NW][MPUF];
  logic          we_w       [NW][MPUF];

  logic [W-1:0]  ref_mem [DEPTH];
  logic [W-1:0]  expect_r [NR][MPUF];
  int checks = 0, failures = 0, forwarded = 0, windows = 0;
  int last_load_cycle = -1, cycle = 0;

  sr_mpompu_rf #(.W(W), .DEPTH(DEPTH), .NR(NR), .NW(NW), .MPUF(MPUF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write port p owns bank NW-1-p: port 0 -> words 32..63, port 1 -> 0..31.
  function automatic int bank_lo(input int p);
    return (NW - 1 - p) * HALF;
  endfunction

  // One processor cycle: present requests, then check in the last inner cycle.
  task automatic proc_cycle(input bit fill, input int fill_idx, input bit check);
    logic [AW-1:0] ar [NR][MPUF];
    bit            wrote [DEPTH];
    for (int a = 0; a < DEPTH; a++) wrote[a] = 0;
    for (int c = 0; c < MPUF; c++) begin
      @(negedge clk);
      ld = (c == 0);
      if (c == 0) begin
        if (last_load_cycle >= 0 && cycle - last_load_cycle != MPUF) begin
          failures++; $display("processor cycle was %0d inner cycles", cycle - last_load_cycle);
        end
        last_load_cycle = cycle;
        for (int j = 0; j < NR; j++) for (int x = 0; x < MPUF; x++) begin
          ar[j][x] = AW'($urandom);
          addr_r[j][x] = ar[j][x];
        end
        for (int j = 0; j < NW; j++) for (int x = 0; x < MPUF; x++) begin
          if (fill) begin
            addr_w[j][x] = AW'(bank_lo(j) + (fill_idx * MPUF + x) % HALF);
            we_w[j][x]   = 1'b1;
          end else begin
            addr_w[j][x] = AW'(bank_lo(j) + $urandom % HALF);
            we_w[j][x]   = ($urandom % 3) != 0;
          end
          data_in_w[j][x] = W'($urandom);
        end
        // the reference model, lane by lane
        for (int x = 0; x < MPUF; x++) begin
          for (int j = 0; j < NR; j++) begin
            expect_r[j][x] = ref_mem[ar[j][x]];
            if (wrote[ar[j][x]]) forwarded++;
          end
          for (int j = 0; j < NW; j++) if (we_w[j][x]) begin
            ref_mem[addr_w[j][x]] = data_in_w[j][x];
            wrote[addr_w[j][x]]   = 1;
          end
        end
      end
      if (c == MPUF - 1 && check) begin
        #1;
        for (int j = 0; j < NR; j++) for (int x = 0; x < MPUF; x++) begin
          checks++;
          if (data_out_r[j][x] !== expect_r[j][x]) begin
            failures++;
            $display("window %0d port %0d lane %0d addr %0d: got %h expected %h",
                     windows, j, x, ar[j][x], data_out_r[j][x], expect_r[j][x]);
          end
        end
      end
    end
    windows++;
  endtask

  initial begin
    rst = 1; ld = 0;
    for (int j = 0; j < NR; j++) for (int x = 0; x < MPUF; x++) addr_r[j][x] = '0;
    for (int j = 0; j < NW; j++) for (int x = 0; x < MPUF; x++) begin
      addr_w[j][x] = '0; data_in_w[j][x] = '0; we_w[j][x] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < (HALF + MPUF - 1) / MPUF; i++) proc_cycle(1, i, 0);
    for (int i = 0; i < 600; i++) proc_cycle(0, 0, 1);
    checks++;
    if (forwarded == 0) begin failures++; $display("no same-cycle write-then-read occurred"); end
    $display("reads of a word written earlier in the same processor cycle: %0d", forwarded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
