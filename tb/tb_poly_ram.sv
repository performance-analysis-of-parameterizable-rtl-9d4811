// tb_poly_ram: self-checking test of the polynomial memory.
// Writes random words at random addresses, keeps a shadow copy here, and
// checks both asynchronous read ports at every address.
module tb_poly_ram;
  localparam int W = 128, DEPTH = 139, AW = 8;
  logic clk = 0;
  logic [AW-1:0] raddr0, raddr1, waddr;
  logic [W-1:0] rdata0, rdata1, wdata;
  logic we;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;
  poly_ram #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; raddr0 = 0; raddr1 = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a);
      for (int k = 0; k < W / 32; k++) wdata[k*32 +: 32] = $urandom;
      shadow[a] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); we = 1; waddr = AW'($urandom % DEPTH);
      for (int k = 0; k < W / 32; k++) wdata[k*32 +: 32] = $urandom;
      shadow[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr0 = AW'(a); raddr1 = AW'(DEPTH - 1 - a); #1;
      checks += 2;
      if (rdata0 !== shadow[a]) failures++;
      if (rdata1 !== shadow[DEPTH-1-a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
