// tb_piso_sr: self-checking test of the PISO shift register.
//
// With N = 5 lanes, each window raises `ld` for one cycle with five random
// lanes and then checks that `serial_out` shows lane k exactly k cycles after
// the load, lane 0 in the load cycle itself. Also checks that the output is
// zero after reset, before the first load.
module tb_piso_sr;
  localparam int W = 8, N = 5;

  logic         clk = 1'b0, rst, ld;
  logic [W-1:0] par_in [N];
  logic [W-1:0] serial_out;
  logic [W-1:0] lanes  [N];
  int checks = 0, failures = 0;

  piso_sr #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0;
    for (int k = 0; k < N; k++) par_in[k] = W'($urandom);
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    checks++;
    if (serial_out !== '0) begin
      failures++;
      $display("output not cleared by reset: %h", serial_out);
    end
    for (int w = 0; w < 60; w++) begin
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        if (c == 0) begin
          for (int k = 0; k < N; k++) begin
            lanes[k]  = W'($urandom);
            par_in[k] = lanes[k];
          end
          ld = 1;
        end else begin
          ld = 0;
          // the processing element keeps its outputs; change them anyway to
          // show the shift register does not depend on that
          if (w % 2 == 1) for (int k = 0; k < N - 1; k++) par_in[k] = W'($urandom);
        end
        #1;
        checks++;
        if (serial_out !== lanes[c]) begin
          failures++;
          $display("window %0d cycle %0d: got %h expected %h", w, c, serial_out, lanes[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
