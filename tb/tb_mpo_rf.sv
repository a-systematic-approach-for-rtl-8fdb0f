// tb_mpo_rf: self-checking test of the banked and replicated base register
// file.
//
// Configuration of the document's banking example: 512 words, three write
// ports, so banks of 128, 128 and 256 words (bank j written by port 2-j),
// here with 16-bit words and three read ports. The testbench first fills
// every bank through its own port, then runs random traffic: each cycle
// every write port writes a random address, mostly inside its bank and
// sometimes outside it (that write must be dropped), and every read port
// reads a random address. Reads are compared with a reference array before
// the cycle's writes are applied to it.
module tb_mpo_rf;
  localparam int W = 16, DEPTH = 512, NR = 3, NW = 3, AW = 9;

  logic          clk = 1'b0;
  logic          we    [NW];
  logic [AW-1:0] waddr [NW];
  logic [W-1:0]  wdata [NW];
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0, dropped = 0;

  mpo_rf #(.W(W), .DEPTH(DEPTH), .NR(NR), .NW(NW)) dut (.*);

  // Bank range of write port p, from the partition 0-127, 128-255, 256-511.
  function automatic int lo_of(input int p);
    case (NW - 1 - p) 0: return 0; 1: return 128; default: return 256; endcase
  endfunction
  function automatic int hi_of(input int p);
    case (NW - 1 - p) 0: return 127; 1: return 255; default: return 511; endcase
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NW; p++) begin we[p] = 0; waddr[p] = '0; wdata[p] = '0; end
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    // fill: port p walks its own bank
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        int a;
        a = lo_of(p) + i;
        we[p] = (a <= hi_of(p));
        waddr[p] = AW'(a);
        wdata[p] = W'($urandom);
        if (we[p]) ref_mem[a] = wdata[p];
      end
    end
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom);
      for (int p = 0; p < NW; p++) begin
        we[p]    = ($urandom % 4) != 0;
        wdata[p] = W'($urandom);
        if ($urandom % 8 == 0) waddr[p] = AW'($urandom);
        else waddr[p] = AW'(lo_of(p) + $urandom % (hi_of(p) - lo_of(p) + 1));
      end
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== ref_mem[raddr[r]]) begin
          failures++;
          $display("cycle %0d port %0d addr %0d: got %h expected %h", i, r, raddr[r], rdata[r], ref_mem[raddr[r]]);
        end
      end
      for (int p = 0; p < NW; p++) begin
        if (we[p] && int'(waddr[p]) >= lo_of(p) && int'(waddr[p]) <= hi_of(p)) ref_mem[waddr[p]] = wdata[p];
        else if (we[p]) dropped++;
      end
    end
    checks++;
    if (dropped == 0) begin failures++; $display("no out-of-bank write was exercised"); end
    $display("out-of-bank writes dropped: %0d", dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
