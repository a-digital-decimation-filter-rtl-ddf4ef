// tb_cic_comb_section: checks the comb cascade. Samples enter with gaps of
// 0 to 20 idle clocks (0 means back to back). Each result must appear
// exactly N-1 clock edges after its sample was taken and equal
// sum_k (-1)^k C(N,k) u[m-k] modulo 2^W, with the binomial coefficients
// computed here.
module tb_cic_comb_section;
  import tb_ref_pkg::*;

  localparam int N = 5, W = 23, SAMPLES = 600;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [W-1:0] din, dout;
  logic out_valid;
  int checks = 0, failures = 0;
  longint u [$];
  int     t_in [$];
  int     cyc = 0;
  int     nout = 0;
  longint binom [N+1];

  cic_comb_section #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * (SAMPLES * 25 + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      longint e;
      e = 0;
      for (int k = 0; k <= N; k++)
        if (nout - k >= 0) e += ((k % 2) ? -binom[k] : binom[k]) * u[nout - k];
      e = wrap(e, W);
      checks++;
      if (longint'(dout) != e) begin
        failures++;
        if (failures < 10) $display("out %0d: %0d expected %0d", nout, dout, e);
      end
      checks++;
      if (cyc - t_in[nout] != N - 1) begin
        failures++;
        $display("out %0d: latency %0d expected %0d", nout, cyc - t_in[nout], N - 1);
      end
      nout++;
    end
  end

  initial begin
    binom[0] = 1;
    for (int k = 1; k <= N; k++) binom[k] = binom[k-1] * (N - k + 1) / k;
    in_valid = 0;
    din = '0;
    repeat (3) @(negedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int m = 0; m < SAMPLES; m++) begin
      logic signed [W-1:0] v;
      int gap;
      v = W'($urandom);
      gap = $urandom_range(0, 20);
      repeat (gap) begin
        in_valid <= 0;
        @(negedge clk);
      end
      in_valid <= 1;
      din <= v;
      u.push_back(longint'(v));
      t_in.push_back(cyc + 1);
      @(negedge clk);
    end
    in_valid <= 0;
    repeat (N + 3) @(negedge clk);
    checks++;
    if (nout != SAMPLES) begin
      failures++;
      $display("got %0d outputs, expected %0d", nout, SAMPLES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
