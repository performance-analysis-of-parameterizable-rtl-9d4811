// fwg_harness: drives one fixed_weight_gen instance for tb_fixed_weight_gen.
module fwg_harness #(
  parameter int unsigned N = 40,
  parameter int unsigned MAX_WT = 20,
  parameter int unsigned RUNS = 4
) (
  input logic clk,
  input logic rst_n
);
  localparam int unsigned PW  = $clog2(N);
  localparam int unsigned WTW = $clog2(MAX_WT + 1);
  int checks = 0, failures = 0, dups = 0;
  logic finished = 0;

  logic start, busy, done, rnd_valid, rnd_ready, out_we;
  logic [WTW-1:0] weight, out_idx;
  logic [31:0] rnd_data;
  logic [PW-1:0] out_pos;

  fixed_weight_gen #(.N(N), .MAX_WT(MAX_WT)) dut (.*);

  logic [31:0] rnd [MAX_WT];
  int unsigned expv [MAX_WT];
  int unsigned got [MAX_WT];
  int unsigned ridx;
  bit stall;

  // random stream
  always_ff @(posedge clk) begin
    if (rnd_valid && rnd_ready) ridx <= ridx + 1;
  end
  assign rnd_data = rnd[ridx % MAX_WT];
  always_ff @(negedge clk) rnd_valid <= stall ? (($urandom % 3) != 0) : 1'b1;

  always_ff @(posedge clk) begin
    if (out_we) got[out_idx] <= 32'(out_pos);
  end

  initial begin
    int unsigned wt, t0, lat;
    bit seen;
    start = 0; weight = 0; ridx = 0; stall = 0;
    wait (rst_n);
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int run = 0; run < RUNS; run++) begin
      wt = (run == 0) ? MAX_WT : 1 + ($urandom % MAX_WT);
      stall = (run % 2) == 1;
      for (int i = 0; i < MAX_WT; i++) rnd[i] = $urandom;
      for (int i = 0; i < wt; i++) expv[i] = i + int'((64'(rnd[i]) * 64'(N - i)) >> 32);
      for (int i = wt - 1; i >= 0; i--) begin
        seen = 0;
        for (int k = i + 1; k < wt; k++) if (expv[k] == expv[i]) seen = 1;
        if (seen) begin expv[i] = i; dups++; end
      end
      ridx = 0;
      weight = WTW'(wt);
      start = 1;
      t0 = $time;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      lat = ($time - t0) / 10;
      if (!stall) begin
        checks++;
        if (lat != 3 * wt + 1) begin
          failures++;
          $display("latency %0d expected %0d", lat, 3 * wt + 1);
        end
      end
      for (int i = 0; i < wt; i++) begin
        checks++;
        if (got[i] != expv[i] || got[i] >= N) begin
          failures++;
          if (failures < 5) $display("N=%0d pos[%0d]=%0d expected %0d", N, i, got[i], expv[i]);
        end
        for (int k = 0; k < i; k++) if (got[k] == got[i]) failures++;
      end
    end
    finished = 1;
  end
endmodule
