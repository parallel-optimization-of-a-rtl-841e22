// rbca_table_tb: runs the ripple-block carry adder in every n-bit, m-block
// configuration of the published cost tables (n = 8 to 128, m = 2 to 32
// blocks), each against integer addition with corner cases and random
// operands (8-bit sizes exhaustively), with the ancillae checked to return to 0.
module rbca_table_tb;
  localparam int NCFG = 22;
  int c [NCFG];
  int f [NCFG];
  bit d [NCFG];
  int checks, failures;

  rbca_cfg_run #(.N(8), .M(2), .RANDOM(2000)) r0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  rbca_cfg_run #(.N(8), .M(4), .RANDOM(2000)) r1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  rbca_cfg_run #(.N(8), .M(8), .RANDOM(2000)) r2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  rbca_cfg_run #(.N(16), .M(2), .RANDOM(2000)) r3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  rbca_cfg_run #(.N(16), .M(4), .RANDOM(2000)) r4 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  rbca_cfg_run #(.N(16), .M(8), .RANDOM(2000)) r5 (.checks(c[5]), .failures(f[5]), .done(d[5]));
  rbca_cfg_run #(.N(16), .M(16), .RANDOM(2000)) r6 (.checks(c[6]), .failures(f[6]), .done(d[6]));
  rbca_cfg_run #(.N(32), .M(2), .RANDOM(2000)) r7 (.checks(c[7]), .failures(f[7]), .done(d[7]));
  rbca_cfg_run #(.N(32), .M(4), .RANDOM(2000)) r8 (.checks(c[8]), .failures(f[8]), .done(d[8]));
  rbca_cfg_run #(.N(32), .M(8), .RANDOM(2000)) r9 (.checks(c[9]), .failures(f[9]), .done(d[9]));
  rbca_cfg_run #(.N(32), .M(16), .RANDOM(2000)) r10 (.checks(c[10]), .failures(f[10]), .done(d[10]));
  rbca_cfg_run #(.N(32), .M(32), .RANDOM(2000)) r11 (.checks(c[11]), .failures(f[11]), .done(d[11]));
  rbca_cfg_run #(.N(64), .M(2), .RANDOM(2000)) r12 (.checks(c[12]), .failures(f[12]), .done(d[12]));
  rbca_cfg_run #(.N(64), .M(4), .RANDOM(2000)) r13 (.checks(c[13]), .failures(f[13]), .done(d[13]));
  rbca_cfg_run #(.N(64), .M(8), .RANDOM(2000)) r14 (.checks(c[14]), .failures(f[14]), .done(d[14]));
  rbca_cfg_run #(.N(64), .M(16), .RANDOM(2000)) r15 (.checks(c[15]), .failures(f[15]), .done(d[15]));
  rbca_cfg_run #(.N(64), .M(32), .RANDOM(2000)) r16 (.checks(c[16]), .failures(f[16]), .done(d[16]));
  rbca_cfg_run #(.N(128), .M(2), .RANDOM(2000)) r17 (.checks(c[17]), .failures(f[17]), .done(d[17]));
  rbca_cfg_run #(.N(128), .M(4), .RANDOM(2000)) r18 (.checks(c[18]), .failures(f[18]), .done(d[18]));
  rbca_cfg_run #(.N(128), .M(8), .RANDOM(2000)) r19 (.checks(c[19]), .failures(f[19]), .done(d[19]));
  rbca_cfg_run #(.N(128), .M(16), .RANDOM(2000)) r20 (.checks(c[20]), .failures(f[20]), .done(d[20]));
  rbca_cfg_run #(.N(128), .M(32), .RANDOM(2000)) r21 (.checks(c[21]), .failures(f[21]), .done(d[21]));

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
    $display("configurations: %0d", NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
