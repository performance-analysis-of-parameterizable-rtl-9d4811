// poly_mult_harness: drives one poly_mult instance for tb_poly_mult.
// Holds the dense operand memory and the position list, starts RUNS random
// multiplications and compares product and latency with a reference model.
// The first run uses weight FIRST_WT (MAX_WT when 0), the others random weights.
module poly_mult_harness #(
  parameter int unsigned N = 97,
  parameter int unsigned W = 16,
  parameter int unsigned MAX_WT = 9,
  parameter int unsigned RUNS = 4,
  parameter int unsigned FIRST_WT = 0  // weight of the first run, 0 = MAX_WT
) (
  input logic clk,
  input logic rst_n
);
  localparam int unsigned D   = (N + W - 1) / W;
  localparam int unsigned DAW = $clog2(D + 1);
  localparam int unsigned PW  = $clog2(N);
  localparam int unsigned WTW = $clog2(MAX_WT + 1);

  int checks = 0, failures = 0;
  logic finished = 0;

  logic start, busy, done;
  logic [WTW-1:0] weight, pos_addr;
  logic [PW-1:0] pos_data;
  logic [DAW-1:0] da_addr, db_addr, res_addr;
  logic [W-1:0] da_data, db_data, res_data;

  logic [W-1:0] mem [D];
  logic [PW-1:0] plist [MAX_WT];
  bit a_bits [N];
  bit c_bits [N];

  assign da_data  = (32'(da_addr) < D) ? mem[da_addr] : '0;
  assign db_data  = (32'(db_addr) < D) ? mem[db_addr] : '0;
  assign pos_data = (32'(pos_addr) < MAX_WT) ? plist[pos_addr] : '0;

  poly_mult #(.N(N), .W(W), .MAX_WT(MAX_WT)) dut (.*);

  initial begin
    int unsigned wt, p, t0, lat, expl;
    bit dup;
    start = 0; weight = '0; res_addr = '0;
    wait (rst_n);
    for (int run = 0; run < RUNS; run++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) a_bits[i] = bit'($urandom % 2);
      for (int d = 0; d < D; d++)
        for (int t = 0; t < W; t++)
          mem[d][t] = (d * W + t < N) ? a_bits[d*W+t] : 1'b0;
      wt = (run == 0) ? ((FIRST_WT != 0) ? FIRST_WT : MAX_WT) : 1 + ($urandom % MAX_WT);
      for (int i = 0; i < wt; i++) begin
        do begin
          p = (run == 1 && i == 0) ? N - 1 : $urandom % N;
          dup = 0;
          for (int k = 0; k < i; k++) if (plist[k] == PW'(p)) dup = 1;
        end while (dup);
        plist[i] = PW'(p);
      end
      for (int i = 0; i < N; i++) c_bits[i] = 0;
      for (int k = 0; k < wt; k++)
        for (int i = 0; i < N; i++)
          if (a_bits[i]) c_bits[(i + plist[k]) % N] ^= 1;
      weight = WTW'(wt);
      start = 1;
      t0 = $time;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      lat = ($time - t0) / 10;
      expl = wt * (D + 4) + D + 2;
      checks++;
      if (lat != expl) begin
        failures++;
        $display("N=%0d latency %0d expected %0d", N, lat, expl);
      end
      for (int d = 0; d < D; d++) begin
        res_addr = DAW'(d);
        #1;
        for (int t = 0; t < W; t++) begin
          checks++;
          if (res_data[t] !== ((d * W + t < N) ? c_bits[d*W+t] : 1'b0)) begin
            failures++;
            if (failures < 5) $display("N=%0d word %0d bit %0d wrong", N, d, t);
          end
        end
      end
    end
    finished = 1;
  end
endmodule
