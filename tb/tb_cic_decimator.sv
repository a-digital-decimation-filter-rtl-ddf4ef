// tb_cic_decimator: checks the CIC filter at its default size (N = 5,
// D = 16, 3-bit input, 23-bit output) against a direct convolution with the
// CIC impulse response, computed here by polynomial multiplication.
// Output m must equal sum_k h[k] * x[16m + 10 - k] and leave on clock edge
// 16m + 19 after reset, so one result every 16 input samples. The stimulus
// mixes random samples with long runs of the extreme values +3 and -4, which
// give the largest outputs (+3 * 16^5 and -4 * 16^5, the ends of the 23-bit
// range).
module tb_cic_decimator;
  import tb_ref_pkg::*;

  localparam int N = 5, D = 16, IN_W = 3, W = 23;
  localparam int CYCLES = 6000;

  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] din;
  logic signed [W-1:0] dout;
  logic out_valid;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int hit_max = 0, hit_min = 0;
  longint h[];
  longint x [$];

  cic_decimator #(.N(N), .D(D), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (CYCLES + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [IN_W-1:0] stim(int t);
    if (t < 1500)      return IN_W'($urandom);
    else if (t < 2500) return 3'sd3;
    else if (t < 3500) return -3'sd4;
    else if (t < 4000) return 3'sd3;
    else               return IN_W'($urandom_range(0, 2) - 1);
  endfunction

  initial begin
    cic_kernel(N, D, h);
    din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < CYCLES; t++) begin
      logic signed [IN_W-1:0] v;
      v = stim(t);
      din <= v;
      x.push_back(longint'(v));
      @(posedge clk);
      #1;
      // cyc counts clock edges since reset release: this was edge t
      if (out_valid) begin
        longint e;
        int base;
        base = D * nout + D - 1 - N;
        e = 0;
        foreach (h[k]) if (base - k >= 0) e += h[k] * x[base - k];
        checks++;
        if (longint'(dout) != e) begin
          failures++;
          if (failures < 10) $display("out %0d: %0d expected %0d", nout, dout, e);
        end
        checks++;
        if (t != D * nout + D + N - 2) begin
          failures++;
          $display("out %0d at edge %0d, expected %0d", nout, t, D * nout + D + N - 2);
        end
        if (e == 3 * (1 << 20)) hit_max++;
        if (e == -4 * (1 << 20)) hit_min++;
        nout++;
      end
    end
    checks++;
    if (nout != (CYCLES - N) / D) begin
      failures++;
      $display("got %0d outputs, expected %0d", nout, (CYCLES - N) / D);
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin
      failures++;
      $display("full-scale outputs not reached");
    end
    $display("outputs=%0d full-scale +: %0d  -: %0d", nout, hit_max, hit_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
