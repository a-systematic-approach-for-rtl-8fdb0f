// piso_sr: parallel-in serial-out shift register of a multi-pumped port.
//
// A processing element that runs N times slower than the register file hands
// over N requests at once. On the register-file clock cycle in which `ld` is
// high, lane 0 goes straight through to `serial_out` while lanes 1..N-1 are
// captured in a chain of N-1 registers. On each of the following N-1 cycles
// (`ld` low) the chain shifts by one towards the output, so `serial_out`
// presents lane 0, 1, ..., N-1 on consecutive cycles.
//
// Structure as in the document: a two-to-one multiplexer in front of every
// register except the one holding the last lane, selecting either the lane
// input (load) or the previous register (shift), and one more multiplexer at
// the output that passes lane 0 while loading. Only two-input multiplexers
// are used, whatever N is. The register holding the last lane loads on `ld`
// and otherwise takes zero, so zeros follow the last lane down the chain and
// the register is empty once the window has been shifted out, as the
// document describes; a write-enable chain therefore issues no writes
// outside a window. With N = 1 the register is a plain wire.
//
// The synchronous reset that clears the chain is this design's addition: it
// keeps a write-enable chain from issuing stray writes before the first load.
module piso_sr #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] par_in [N],
  output logic [W-1:0] serial_out
);

  if (N == 1) begin : g_wire
    assign serial_out = par_in[0];
  end else begin : g_chain
    // stage[k] holds the value that reaches the output k cycles after a load.
    logic [W-1:0] stage [1:N-1];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 1; k < N; k++) stage[k] <= '0;
      end else begin
        stage[N-1] <= ld ? par_in[N-1] : '0;
        for (int k = 1; k < N - 1; k++)
          stage[k] <= ld ? par_in[k] : stage[k+1];
      end
    end

    assign serial_out = ld ? par_in[0] : stage[1];
  end

endmodule
