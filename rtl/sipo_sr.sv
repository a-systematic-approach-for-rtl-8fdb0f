// sipo_sr: serial-in parallel-out shift register of a multi-pumped read port.
//
// The register file produces one read value per register-file clock cycle
// for a port pumped N times. The values enter at `serial_in` and move through
// N-1 plain registers, one per cycle. After N cycles the value read in cycle
// 0 of the window is at `par_out[0]`, the one read in cycle N-2 is at
// `par_out[N-2]`, and the value being read in the last cycle, N-1, is taken
// straight from `serial_in` as `par_out[N-1]`. The processing element samples
// all N lanes at its own clock edge, which ends that last cycle.
//
// As in the document, the chain is flip-flops only, with no logic between
// them. With N = 1 it is a plain wire.
module sipo_sr #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic [W-1:0] serial_in,
  output logic [W-1:0] par_out [N]
);

  if (N == 1) begin : g_wire
    assign par_out[0] = serial_in;
  end else begin : g_chain
    logic [W-1:0] stage [N-1];

    always_ff @(posedge clk) begin
      stage[N-2] <= serial_in;
      for (int k = 0; k + 2 < N; k++) stage[k] <= stage[k+1];
    end

    for (genvar k = 0; k < N - 1; k++) begin : g_out
      assign par_out[k] = stage[k];
    end
    assign par_out[N-1] = serial_in;
  end

endmodule
