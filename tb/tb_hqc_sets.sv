// tb_hqc_sets: the end-to-end exercise of hqc_e2e for the other datapath
// widths evaluated for HQC-1 (W = 256, 512, 1024) and for the HQC-3 and
// HQC-5 parameter sets at W = 128, and the parallel-encrypt variant
// (PARALLEL = 1) of HQC-1 at W = 128. All six instances run side by side.
// Parameter sets: HQC-3 n = 35,851, n1 = 56, n2 = 640, w = 100, w_r = 114,
// k = 192 bits; HQC-5 n = 57,637, n1 = 90, n2 = 640, w = 131, w_r = 149,
// k = 256 bits.
module tb_hqc_sets
  import tb_ref_pkg::*;
;
  int c [6], f [6];
  logic fin [6];

  hqc_e2e #(.W(256),  .DEFAULTS(1'b0)) u_w256  (.checks(c[0]), .failures(f[0]), .finished(fin[0]));
  hqc_e2e #(.W(512),  .DEFAULTS(1'b0)) u_w512  (.checks(c[1]), .failures(f[1]), .finished(fin[1]));
  hqc_e2e #(.W(1024), .DEFAULTS(1'b0)) u_w1024 (.checks(c[2]), .failures(f[2]), .finished(fin[2]));
  hqc_e2e #(.N(35851), .N1(56), .N2(640), .WT(100), .WR(114), .KB(24), .W(128), .DEFAULTS(1'b0))
    u_hqc3 (.checks(c[3]), .failures(f[3]), .finished(fin[3]));
  hqc_e2e #(.N(57637), .N1(90), .N2(640), .WT(131), .WR(149), .KB(32), .W(128), .DEFAULTS(1'b0))
    u_hqc5 (.checks(c[4]), .failures(f[4]), .finished(fin[4]));
  hqc_e2e #(.W(128), .PARALLEL(1'b1), .DEFAULTS(1'b0))
    u_par  (.checks(c[5]), .failures(f[5]), .finished(fin[5]));

  function automatic int sum(int a [6]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    #60000000;  // watchdog: 6,000,000 cycles of 10 time units
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end
endmodule
