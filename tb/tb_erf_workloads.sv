// tb_erf_workloads: the emulated register file in every configuration of
// the document's comparison tables, each checked against its reference
// model (see erf_env).
//
//   32-bit x 64, 12R&6W:  base 6R&3W x2, 4R&2W x3, 2R&1W x6
//   64-bit x 512, 18R&12W: base 9R&6W x2, 6R&4W x3, 3R&2W x6
//   64-bit x 512, 32R&24W: base 8R&6W x4, 4R&3W x8
//   32-bit x 512, 8R&4W:  base 2R&1W x4 (the high-level-synthesis example)
module tb_erf_workloads;
  localparam int NCFG = 9;
  int c [NCFG], f [NCFG];
  bit d [NCFG];
  int checks, failures;

  erf_env #(.W(32), .DEPTH(64),  .NR(6), .NW(3), .MPUF(2)) u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  erf_env #(.W(32), .DEPTH(64),  .NR(4), .NW(2), .MPUF(3)) u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  erf_env #(.W(32), .DEPTH(64),  .NR(2), .NW(1), .MPUF(6)) u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  erf_env #(.W(64), .DEPTH(512), .NR(9), .NW(6), .MPUF(2)) u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  erf_env #(.W(64), .DEPTH(512), .NR(6), .NW(4), .MPUF(3)) u4 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  erf_env #(.W(64), .DEPTH(512), .NR(3), .NW(2), .MPUF(6)) u5 (.checks(c[5]), .failures(f[5]), .done(d[5]));
  erf_env #(.W(64), .DEPTH(512), .NR(8), .NW(6), .MPUF(4)) u6 (.checks(c[6]), .failures(f[6]), .done(d[6]));
  erf_env #(.W(64), .DEPTH(512), .NR(4), .NW(3), .MPUF(8)) u7 (.checks(c[7]), .failures(f[7]), .done(d[7]));
  erf_env #(.W(32), .DEPTH(512), .NR(2), .NW(1), .MPUF(4)) u8 (.checks(c[8]), .failures(f[8]), .done(d[8]));

  initial begin
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #100;
      all_done = 1;
      for (int i = 0; i < NCFG; i++) all_done &= d[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      $display("configuration %0d: checks=%0d failures=%0d", i, c[i], f[i]);
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
