// endian_map: bus reordering between the register file and a processing
// element of another endianness.
//
// The heterogeneous register file stores every word little-endian. A port
// that serves a big-endian processing element is connected through this
// reordering, fixed at design time by the MODE parameter:
//   ENDIAN_LITTLE   - straight wiring, bit i to bit i;
//   ENDIAN_BIG_BIT  - the bus is reversed, bit i to bit W-1-i, as in the
//                     document's 32-bit big-endian example;
//   ENDIAN_BIG_BYTE - byte order reversed, bit order inside a byte kept
//                     (the document allows byte order to be configured per
//                     element; this is the byte-swap chosen here). W must be
//                     a multiple of 8.
// Both reorderings are their own inverse, so the same block serves the
// write direction (PE to register file) and the read direction. It is pure
// wiring: no logic and no delay.
module endian_map #(
  parameter int unsigned     W    = 32,
  parameter rf_pkg::endian_e MODE = rf_pkg::ENDIAN_BIG_BIT
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  if (MODE == rf_pkg::ENDIAN_BIG_BIT) begin : g_bit
    for (genvar i = 0; i < W; i++) begin : g_b
      assign y[i] = a[W-1-i];
    end
  end else if (MODE == rf_pkg::ENDIAN_BIG_BYTE) begin : g_byte
    if (W % 8 != 0) begin : g_bad
      $error("endian_map: byte reordering needs a width that is a multiple of 8");
    end
    localparam int unsigned NBYTES = W / 8;
    for (genvar i = 0; i < NBYTES; i++) begin : g_b
      assign y[8*i +: 8] = a[8*(NBYTES-1-i) +: 8];
    end
  end else begin : g_straight
    assign y = a;
  end

endmodule
