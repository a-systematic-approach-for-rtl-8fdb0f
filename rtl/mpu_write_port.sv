// mpu_write_port: one multi-pumped write port of a register file.
//
// A processing element (PE) clocked N times slower than the register file
// presents N write requests (address, data, write enable) at once and
// raises `ld` for the first register-file cycle of its clock period. Three
// PISO shift registers, one each for address, data and enable, hand the
// requests to one physical write port of the register file on N consecutive
// cycles: lane 0 in the load cycle itself, lane k in cycle k. A lane with its
// enable low writes nothing.
//
// Lanes are therefore written in order 0..N-1, and a read scheduled in a
// later cycle of the same window sees the earlier lanes' writes.
//
// With N = 1 the port is wired straight through and `ld` is unused. The PE
// must raise `ld` exactly every N cycles once it has started; an assertion
// checks this. The assertion and the reset of the chains (which keeps a
// random power-up state from issuing writes) are this design's additions.
module mpu_write_port #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 64,
  parameter int unsigned N  = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld,
  // PE side
  input  logic [AW-1:0] wr_addr [N],
  input  logic [DW-1:0] wr_data [N],
  input  logic          wr_en   [N],
  // register-file side
  output logic [AW-1:0] rf_addr,
  output logic [DW-1:0] rf_data,
  output logic          rf_we
);

  logic [0:0] en_lanes [N];
  logic [0:0] en_serial;

  for (genvar k = 0; k < N; k++) begin : g_en
    assign en_lanes[k] = wr_en[k];
  end

  piso_sr #(.W(AW), .N(N)) u_addr_piso (
    .clk, .rst, .ld, .par_in(wr_addr), .serial_out(rf_addr)
  );

  piso_sr #(.W(DW), .N(N)) u_data_piso (
    .clk, .rst, .ld, .par_in(wr_data), .serial_out(rf_data)
  );

  piso_sr #(.W(1), .N(N)) u_we_piso (
    .clk, .rst, .ld, .par_in(en_lanes), .serial_out(en_serial)
  );

  assign rf_we = en_serial[0];

  if (N > 1) begin : g_check
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
          else $error("mpu_write_port: load must recur every %0d cycles", N);
    end
  end

endmodule
