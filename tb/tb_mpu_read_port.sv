// tb_mpu_read_port: self-checking test of one multi-pumped read port.
//
// The register-file side is a combinational stand-in memory whose word at
// address a is a fixed scramble of a. Every window of N = 4 cycles loads
// four random addresses; the test checks that lane k's address reaches the
// register file in cycle k of the window and that all four lanes of read
// data are valid together in the last cycle, N-1 cycles after the load.
module tb_mpu_read_port;
  localparam int AW = 6, DW = 16, N = 4;

  logic          clk = 1'b0, rst, ld;
  logic [AW-1:0] rd_addr [N];
  logic [DW-1:0] rd_data [N];
  logic [AW-1:0] rf_addr;
  logic [DW-1:0] rf_data;
  logic [AW-1:0] lanes [N];
  int checks = 0, failures = 0;

  function automatic logic [DW-1:0] word_at(input logic [AW-1:0] a);
    return DW'(a) * 16'h9e37 ^ 16'h5a5a;
  endfunction

  assign rf_data = word_at(rf_addr);

  mpu_read_port #(.AW(AW), .DW(DW), .N(N)) dut (.*);

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
    for (int k = 0; k < N; k++) rd_addr[k] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 100; w++) begin
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        ld = (c == 0);
        if (c == 0) for (int k = 0; k < N; k++) begin
          lanes[k] = AW'($urandom);
          rd_addr[k] = lanes[k];
        end
        #1;
        checks++;
        if (rf_addr !== lanes[c]) begin
          failures++;
          $display("window %0d cycle %0d: address %0d expected %0d", w, c, rf_addr, lanes[c]);
        end
        if (c == N - 1) begin
          for (int k = 0; k < N; k++) begin
            checks++;
            if (rd_data[k] !== word_at(lanes[k])) begin
              failures++;
              $display("window %0d lane %0d: data %h expected %h", w, k, rd_data[k], word_at(lanes[k]));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
