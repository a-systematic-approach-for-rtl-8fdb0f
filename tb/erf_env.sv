// erf_env: reusable stimulus and reference model for one emulated
// multi-port register file configuration.
//
// Instantiates sr_mpompu_rf with the given size, base port counts and
// pumping factor, fills every bank through its own write port, then runs
// WINDOWS random processor cycles of NR*MPUF reads and NW*MPUF writes (about
// one write in ten aimed outside its port's bank, which must be dropped).
// The reference model computes the bank of each write port from the
// partition rule (top ceil(log2 NW) address bits pick equal slots, the last
// bank takes the rest, port p owns bank NW-1-p), serves lanes in order with
// reads before writes, and checks every read in the last inner cycle of its
// processor cycle. It also checks that each processor cycle is exactly MPUF
// inner cycles. Results are reported through `checks`, `failures` and `done`.
module erf_env #(
  parameter int unsigned W       = 32,
  parameter int unsigned DEPTH   = 64,
  parameter int unsigned NR      = 2,
  parameter int unsigned NW      = 1,
  parameter int unsigned MPUF    = 2,
  parameter int unsigned WINDOWS = 100
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int AW   = $clog2(DEPTH);
  localparam int SEL  = (NW > 1) ? $clog2(NW) : 0;
  localparam int SLOT = DEPTH >> SEL;

  logic          clk = 1'b0, rst, ld;
  logic [AW-1:0] addr_r     [NR][MPUF];
  logic [W-1:0]  data_out_r [NR][MPUF];
  logic [AW-1:0] addr_w     [NW][MPUF];
  logic [W-1:0]  data_in_w  [NW][MPUF];
  logic          we_w       [NW][MPUF];
  logic [W-1:0]  ref_mem [DEPTH];
  int cycle = 0, last_load = -1;

  sr_mpompu_rf #(.W(W), .DEPTH(DEPTH), .NR(NR), .NW(NW), .MPUF(MPUF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int lo_of(input int p);
    return (NW - 1 - p) * SLOT;
  endfunction
  function automatic int h_of(input int p);
    return (NW - 1 - p == NW - 1) ? DEPTH - (NW - 1) * SLOT : SLOT;
  endfunction

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  task automatic window(input bit fill, input int fidx, input bit check);
    logic [AW-1:0] ar [NR][MPUF];
    logic [W-1:0]  ex [NR][MPUF];
    for (int c = 0; c < MPUF; c++) begin
      @(negedge clk);
      ld = (c == 0);
      if (c == 0) begin
        checks++;
        if (last_load >= 0 && cycle - last_load != MPUF) begin
          failures++;
          $display("processor cycle of %0d inner cycles", cycle - last_load);
        end
        last_load = cycle;
        for (int j = 0; j < NR; j++) for (int x = 0; x < MPUF; x++) begin
          ar[j][x] = AW'($urandom);
          addr_r[j][x] = ar[j][x];
        end
        for (int j = 0; j < NW; j++) for (int x = 0; x < MPUF; x++) begin
          if (fill) begin
            addr_w[j][x] = AW'(lo_of(j) + (fidx * MPUF + x) % h_of(j));
            we_w[j][x]   = 1'b1;
          end else begin
            we_w[j][x]   = ($urandom % 3) != 0;
            if ($urandom % 10 == 0) addr_w[j][x] = AW'($urandom);
            else addr_w[j][x] = AW'(lo_of(j) + $urandom % h_of(j));
          end
          data_in_w[j][x] = rnd_word();
        end
        for (int x = 0; x < MPUF; x++) begin
          for (int j = 0; j < NR; j++) ex[j][x] = ref_mem[ar[j][x]];
          for (int j = 0; j < NW; j++) begin
            int a;
            a = int'(addr_w[j][x]);
            if (we_w[j][x] && a >= lo_of(j) && a < lo_of(j) + h_of(j)) ref_mem[a] = data_in_w[j][x];
          end
        end
      end
      if (c == MPUF - 1 && check) begin
        #1;
        for (int j = 0; j < NR; j++) for (int x = 0; x < MPUF; x++) begin
          checks++;
          if (data_out_r[j][x] !== ex[j][x]) begin
            failures++;
            $display("%0dR&%0dW x%0d: port %0d lane %0d addr %0d: got %h expected %h",
                     NR, NW, MPUF, j, x, ar[j][x], data_out_r[j][x], ex[j][x]);
          end
        end
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    rst = 1; ld = 0;
    for (int j = 0; j < NR; j++) for (int x = 0; x < MPUF; x++) addr_r[j][x] = '0;
    for (int j = 0; j < NW; j++) for (int x = 0; x < MPUF; x++) begin
      addr_w[j][x] = '0; data_in_w[j][x] = '0; we_w[j][x] = 0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < (DEPTH + MPUF - 1) / MPUF; i++) window(1, i, 0);
    for (int i = 0; i < WINDOWS; i++) window(0, 0, 1);
    done = 1;
    // keep the processor clock running with no requests
    forever begin
      for (int j = 0; j < NW; j++) for (int x = 0; x < MPUF; x++) we_w[j][x] = 0;
      window(0, 0, 0);
    end
  end
endmodule
