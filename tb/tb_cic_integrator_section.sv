// tb_cic_integrator_section: checks the integrator cascade against a
// non-pipelined 64-bit model. The model keeps N running sums, each updated
// from the new value of the one before, which is 1/(1 - z^-1)^N; the RTL has
// one register per stage and must equal that model delayed by N-1 samples,
// reduced modulo 2^W. Random 3-bit samples and long runs of +3 and -4 drive
// the sums far past the W-bit range, so the wrap-around is exercised; the
// test counts a failure if it never happened.
module tb_cic_integrator_section;
  import tb_ref_pkg::*;

  localparam int N = 5, IN_W = 3, W = 23, CYCLES = 4000;

  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] din;
  logic signed [W-1:0] dout;
  int checks = 0, failures = 0, wraps = 0;
  longint s [N];
  longint hist [$];

  cic_integrator_section #(.N(N), .IN_W(IN_W), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) s[k] = 0;
    din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < CYCLES; t++) begin
      logic signed [IN_W-1:0] x;
      if (t < 1000)      x = IN_W'($urandom);
      else if (t < 2000) x = 3'sd3;
      else if (t < 3000) x = -3'sd4;
      else               x = IN_W'($urandom);
      din <= x;
      @(posedge clk);
      // model: new value of each sum
      s[0] += longint'(x);
      for (int k = 1; k < N; k++) s[k] += s[k-1];
      hist.push_back(s[N-1]);
      if (s[N-1] != wrap(s[N-1], W)) wraps++;
      #1;
      if (t >= N - 1) begin
        longint exp_v;
        exp_v = wrap(hist[t - (N - 1)], W);
        checks++;
        if (longint'(dout) != exp_v) begin
          failures++;
          if (failures < 10) $display("t=%0d dout=%0d expected=%0d", t, dout, exp_v);
        end
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("integrator wrap-around never exercised");
    end
    $display("integrator samples beyond the register range: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
