// rbca_tb: checks the ripple-block carry adder at many sizes n / m, among them
// all the block splits of 8 and 16 bits, 32 to 128 bits, and m = 1 (the plain
// CDKM ripple-carry adder). Small sizes are checked exhaustively and for
// reversibility; larger ones with corner cases and random operands.
module rbca_tb;
  localparam int NCFG = 14;
  int  c [NCFG];
  int  f [NCFG];
  bit  d [NCFG];
  int checks, failures;

  rbca_cfg_run #(.N(4),   .M(2))                 r0  (.checks(c[0]),  .failures(f[0]),  .done(d[0]));
  rbca_cfg_run #(.N(6),   .M(3))                 r1  (.checks(c[1]),  .failures(f[1]),  .done(d[1]));
  rbca_cfg_run #(.N(8),   .M(2))                 r2  (.checks(c[2]),  .failures(f[2]),  .done(d[2]));
  rbca_cfg_run #(.N(8),   .M(4))                 r3  (.checks(c[3]),  .failures(f[3]),  .done(d[3]));
  rbca_cfg_run #(.N(8),   .M(8))                 r4  (.checks(c[4]),  .failures(f[4]),  .done(d[4]));
  rbca_cfg_run #(.N(8),   .M(1))                 r5  (.checks(c[5]),  .failures(f[5]),  .done(d[5]));
  rbca_cfg_run #(.N(16),  .M(4), .RANDOM(20000)) r6  (.checks(c[6]),  .failures(f[6]),  .done(d[6]));
  rbca_cfg_run #(.N(16),  .M(8), .RANDOM(5000))  r7  (.checks(c[7]),  .failures(f[7]),  .done(d[7]));
  rbca_cfg_run #(.N(16),  .M(16), .RANDOM(5000)) r8  (.checks(c[8]),  .failures(f[8]),  .done(d[8]));
  rbca_cfg_run #(.N(16),  .M(2), .RANDOM(5000))  r9  (.checks(c[9]),  .failures(f[9]),  .done(d[9]));
  rbca_cfg_run #(.N(32),  .M(8), .RANDOM(5000))  r10 (.checks(c[10]), .failures(f[10]), .done(d[10]));
  rbca_cfg_run #(.N(64),  .M(16), .RANDOM(2000)) r11 (.checks(c[11]), .failures(f[11]), .done(d[11]));
  rbca_cfg_run #(.N(128), .M(16), .RANDOM(1000)) r12 (.checks(c[12]), .failures(f[12]), .done(d[12]));
  rbca_cfg_run #(.N(32),  .M(32), .RANDOM(2000)) r13 (.checks(c[13]), .failures(f[13]), .done(d[13]));

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #10;
      all = 1;
      foreach (d[i]) all &= d[i];
    end while (!all);
    checks = 0; failures = 0;
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
