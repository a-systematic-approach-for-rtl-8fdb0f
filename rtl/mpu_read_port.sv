// mpu_read_port: one multi-pumped read port of a register file.
//
// A processing element (PE) clocked N times slower than the register file
// presents N read addresses at once and raises `ld` for the first
// register-file cycle of its clock period. A PISO shift register feeds the
// addresses to one physical read port of the register file, one per cycle,
// and a SIPO shift register collects the N read values. The PE therefore
// sees N read ports through one physical port.
//
// Timing, in register-file cycles after the cycle in which `ld` is high
// (cycle 0): address lane k reaches `rf_addr` in cycle k; the data returned
// by the register file in that same cycle is shifted into the SIPO. In
// cycle N-1 all N lanes of `rd_data` are valid at once; this is the cycle
// that ends at the PE's next clock edge, where the PE samples them and
// presents its next request with `ld` high again.
//
// With N = 1 the port is wired straight through and `ld` is unused, as the
// document prescribes for a PE running at the register-file clock. The PE
// must raise `ld` exactly every N cycles once it has started; an assertion
// checks this, since the pumping schedule relies on it. The assertion and
// the reset of the address chain are this design's additions.
module mpu_read_port #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 64,
  parameter int unsigned N  = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld,
  // PE side
  input  logic [AW-1:0] rd_addr [N],
  output logic [DW-1:0] rd_data [N],
  // register-file side
  output logic [AW-1:0] rf_addr,
  input  logic [DW-1:0] rf_data
);

  piso_sr #(.W(AW), .N(N)) u_addr_piso (
    .clk, .rst, .ld, .par_in(rd_addr), .serial_out(rf_addr)
  );

  sipo_sr #(.W(DW), .N(N)) u_data_sipo (
    .clk, .serial_in(rf_data), .par_out(rd_data)
  );

  if (N > 1) begin : g_check
    // Cycles since the last load; `started` once a first load has been seen.
    logic                 started;
    logic [$clog2(N)-1:0] phase;

    always_ff @(posedge clk) begin
      if (rst) begin
        started <= 1'b0;
        phase   <= '0;
      end else if (ld) begin
        started <= 1'b1;
        phase   <= '0;
      end else if (started) begin
        phase   <= (phase == $clog2(N)'(N - 1)) ? '0 : phase + 1'b1;
      end
    end

    // The PE clock is an exact multiple of the register-file clock, so once
    // started, loads come exactly every N cycles.
    always_ff @(posedge clk) begin
      if (!rst && started)
        a_load_period : assert (ld == (phase == $clog2(N)'(N - 1)))
          else $error("mpu_read_port: load must recur every %0d cycles", N);
    end
  end

endmodule
