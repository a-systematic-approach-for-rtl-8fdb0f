// tb_mpu_write_port: self-checking test of one multi-pumped write port.
//
// Every window of N = 3 cycles loads three random write requests, some with
// the enable low. The test checks, cycle by cycle, that lane k's address,
// data and enable appear on the register-file side in cycle k of the window,
// and that no write is issued after reset before the first load.
module tb_mpu_write_port;
  localparam int AW = 5, DW = 12, N = 3;

  logic          clk = 1'b0, rst, ld;
  logic [AW-1:0] wr_addr [N];
  logic [DW-1:0] wr_data [N];
  logic          wr_en   [N];
  logic [AW-1:0] rf_addr;
  logic [DW-1:0] rf_data;
  logic          rf_we;
  logic [AW-1:0] la [N];
  logic [DW-1:0] ldat [N];
  logic          len [N];
  int checks = 0, failures = 0;

  mpu_write_port #(.AW(AW), .DW(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0;
    for (int k = 0; k < N; k++) begin wr_addr[k] = '0; wr_data[k] = '0; wr_en[k] = 1'b1; end
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (rf_we !== 1'b0) begin failures++; $display("write issued before first load"); end
    end
    for (int w = 0; w < 100; w++) begin
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        ld = (c == 0);
        if (c == 0) for (int k = 0; k < N; k++) begin
          la[k] = AW'($urandom); ldat[k] = DW'($urandom); len[k] = ($urandom % 3) != 0;
          wr_addr[k] = la[k]; wr_data[k] = ldat[k]; wr_en[k] = len[k];
        end
        #1;
        checks++;
        if (rf_we !== len[c] || (len[c] && (rf_addr !== la[c] || rf_data !== ldat[c]))) begin
          failures++;
          $display("window %0d cycle %0d: we=%b addr=%0d data=%h, expected we=%b addr=%0d data=%h",
                   w, c, rf_we, rf_addr, rf_data, len[c], la[c], ldat[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
