// tb_hqc_top: end-to-end test of the unified accelerator at its default
// parameters (HQC-1, W = 128): key generation, encapsulation, decapsulation
// of the genuine ciphertext and of two tampered ones, all checked against
// reference values computed in the testbench (see hqc_e2e). The top is
// instantiated without a parameter list.
module tb_hqc_top
  import tb_ref_pkg::*;
;
  int checks, failures;
  logic finished;

  hqc_e2e u_e2e (.checks, .failures, .finished);

  initial begin
    #30000000;  // watchdog: 3,000,000 cycles of 10 time units
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
