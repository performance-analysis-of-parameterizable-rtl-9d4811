// tb_acc_lutram: self-checking test of the accumulator memory.
// Performs random writes, checks both asynchronous read ports against a
// shadow array kept here, and checks that `clear` makes every word read zero.
module tb_acc_lutram;
  localparam int unsigned W = 64, DEPTH = 40, AW = 6;
  logic clk = 0, rst_n = 0;
  logic clear, we;
  logic [AW-1:0] raddr0, raddr1, waddr;
  logic [W-1:0] rdata0, rdata1, wdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  acc_lutram #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int a = 0; a < DEPTH; a++) begin
      raddr0 = AW'(a); raddr1 = AW'(DEPTH - 1 - a);
      #1;
      checks += 2;
      if (rdata0 !== shadow[a]) failures++;
      if (rdata1 !== shadow[DEPTH-1-a]) failures++;
    end
  endtask

  initial begin
    clear = 0; we = 0; raddr0 = 0; raddr1 = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) shadow[a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // after reset or clear everything reads as zero
      @(negedge clk); check_reads();
      for (int i = 0; i < 100; i++) begin
        @(negedge clk);
        we = 1; waddr = AW'($urandom % DEPTH); wdata = {$urandom, $urandom};
        @(posedge clk); #1;
        shadow[waddr] = wdata;
        we = 0;
      end
      @(negedge clk); check_reads();
      clear = 1; @(posedge clk); #1; clear = 0;
      for (int a = 0; a < DEPTH; a++) shadow[a] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
