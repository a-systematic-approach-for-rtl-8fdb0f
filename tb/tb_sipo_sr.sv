// tb_sipo_sr: self-checking test of the SIPO shift register.
//
// Streams one random word per cycle into a four-lane SIPO and checks, every
// cycle from the fourth on, that par_out[k] holds the word that entered
// N-1-k cycles earlier and par_out[N-1] the word entering now.
module tb_sipo_sr;
  localparam int W = 12, N = 4;

  logic         clk = 1'b0;
  logic [W-1:0] serial_in;
  logic [W-1:0] par_out [N];
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  sipo_sr #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      serial_in = W'($urandom);
      hist.push_back(serial_in);
      #1;
      if (t >= N - 1) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (par_out[k] !== hist[t - (N - 1) + k]) begin
            failures++;
            $display("t=%0d lane %0d: got %h expected %h", t, k, par_out[k], hist[t-(N-1)+k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
