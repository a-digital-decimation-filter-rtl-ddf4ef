// tb_fir_decimator: checks the FIR filter and its decimation by 2 at the
// default size (31 taps, 23-bit input, 16-bit output). Samples arrive every
// 16 clocks, as from the CIC filter. Output m must equal the rounded,
// clamped convolution of the coefficients with inputs up to c[2m + 1],
// computed here in 64 bits, and leave 31 clocks after c[2m + 1] was taken.
// Three phases: random samples, a DC level, and a pattern that follows the
// signs of the coefficients at full scale, which must drive the output into
// saturation; a failure is counted if saturation never occurred.
module tb_fir_decimator;
  import tb_ref_pkg::*;
  import decim_pkg::*;

  localparam int SAMPLES = 600, GAP = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [CIC_W-1:0] din;
  logic signed [OUT_W-1:0] dout;
  logic out_valid;
  int checks = 0, failures = 0, nout = 0, sats = 0, cyc = 0;
  longint c [$];
  int     t_in [$];

  fir_decimator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * (SAMPLES * GAP + 300));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      longint acc, e;
      int newest;
      bit clamped;
      newest = D2 * nout + D2 - 1;
      acc = 0;
      for (int k = 0; k < FIR_TAPS; k++)
        if (newest - k >= 0) acc += longint'(FIR_COEFS[k]) * c[newest - k];
      e = round_clamp(acc, OUT_SHIFT, OUT_W, clamped);
      if (clamped) sats++;
      checks++;
      if (longint'(dout) != e) begin
        failures++;
        if (failures < 10) $display("out %0d: %0d expected %0d", nout, dout, e);
      end
      checks++;
      if (cyc - t_in[newest] != FIR_TAPS) begin
        failures++;
        $display("out %0d: latency %0d expected %0d", nout, cyc - t_in[newest], FIR_TAPS);
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0;
    din = '0;
    repeat (3) @(negedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int j = 0; j < SAMPLES; j++) begin
      longint v;
      if (j < 200)      v = wrap(longint'($urandom), CIC_W);
      else if (j < 300) v = -(longint'(1) << 22);
      else if (j < 400) begin
        // full-scale samples whose signs line up with the coefficients of
        // the output computed when sample 399 is newest
        int k;
        k = 399 - j;
        if (k < FIR_TAPS) v = (FIR_COEFS[k] < 0) ? -(longint'(1) << 22) : (longint'(1) << 22) - 1;
        else v = 0;
      end
      else              v = wrap(longint'($urandom), CIC_W);
      in_valid <= 1;
      din <= CIC_W'(v);
      c.push_back(v);
      t_in.push_back(cyc + 1);
      @(negedge clk);
      in_valid <= 0;
      repeat (GAP - 1) @(negedge clk);
    end
    repeat (FIR_TAPS + 3) @(negedge clk);
    checks++;
    if (nout != SAMPLES / D2) begin
      failures++;
      $display("got %0d outputs, expected %0d", nout, SAMPLES / D2);
    end
    checks++;
    if (sats == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("outputs=%0d saturated=%0d", nout, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
