// tb_endian_map: self-checking test of the endianness reordering.
//
// Three 32-bit instances, one per mode, see the same random words. The
// expected outputs are built bit by bit (bit reversal) and byte by byte
// (byte swap) in the testbench; the straight mode must pass words unchanged.
module tb_endian_map;
  import rf_pkg::*;
  localparam int W = 32;

  logic [W-1:0] a, y_bit, y_byte, y_le, e_bit, e_byte;
  int checks = 0, failures = 0;

  endian_map #(.W(W), .MODE(ENDIAN_BIG_BIT))  u_bit  (.a, .y(y_bit));
  endian_map #(.W(W), .MODE(ENDIAN_BIG_BYTE)) u_byte (.a, .y(y_byte));
  endian_map #(.W(W), .MODE(ENDIAN_LITTLE))   u_le   (.a, .y(y_le));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = (i == 0) ? 32'h0000_0001 : (i == 1) ? 32'h1234_5678 : $urandom;
      for (int b = 0; b < W; b++) e_bit[b] = a[W-1-b];
      e_byte = {a[7:0], a[15:8], a[23:16], a[31:24]};
      #1;
      checks += 3;
      if (y_bit  !== e_bit)  begin failures++; $display("bit  %h -> %h, expected %h", a, y_bit, e_bit); end
      if (y_byte !== e_byte) begin failures++; $display("byte %h -> %h, expected %h", a, y_byte, e_byte); end
      if (y_le   !== a)      begin failures++; $display("le   %h -> %h", a, y_le); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
