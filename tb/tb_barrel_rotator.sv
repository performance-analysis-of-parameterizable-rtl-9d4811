// tb_barrel_rotator: self-checking test of the two-stage pipelined shifter.
// Drives random {A,B} words and shift amounts every cycle, compares the
// result one cycle later with the upper W bits of ({A,B} << shift) computed
// here with a plain shift, and checks the one-cycle latency via out_valid.
module tb_barrel_rotator;
  localparam int unsigned W = 128;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [2*W-1:0] din;
  logic [$clog2(W)-1:0] shift;
  logic out_valid;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  logic [2*W-1:0] exp_full;
  logic [W-1:0] expected;
  logic exp_valid;

  barrel_rotator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; din = '0; shift = '0; exp_valid = 0; expected = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (!out_valid || dout !== expected) begin
          failures++;
          if (failures < 5) $display("mismatch i=%0d got %h exp %h", i, dout, expected);
        end
      end
      in_valid = ($urandom % 4) != 0;
      for (int k = 0; k < 2*W/32; k++) din[k*32 +: 32] = $urandom;
      shift = (i < 128) ? i[$clog2(W)-1:0] : $urandom;
      exp_full = din << shift;
      @(posedge clk);
      #1;
      exp_valid = in_valid;
      expected = exp_full[2*W-1:W];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
