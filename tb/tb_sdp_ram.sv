// tb_sdp_ram: self-checking test of the simple dual-port RAM.
//
// Writes random words to random addresses while reading random addresses,
// and compares every read with a reference array kept by the testbench. The
// read is asynchronous, so it is checked in the same cycle as its address,
// and a read of the word being written in that cycle must return the old
// value. The whole RAM is written once first, so every read is defined.
module tb_sdp_ram;
  localparam int W = 16, DEPTH = 32, AW = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); ref_mem[a] = wdata;
    end
    // random traffic
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we    = ($urandom % 2) == 1;
      waddr = AW'($urandom);
      wdata = W'($urandom);
      raddr = (i % 7 == 0) ? waddr : AW'($urandom);   // sometimes read the word being written
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
