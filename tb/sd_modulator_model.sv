// sd_modulator_model: behavioural model of the second-order sigma-delta
// modulator with a 3-bit quantizer that feeds the decimation filter. Not
// synthesizable (it uses real numbers): it only produces test stimulus.
//
// Loop: two delaying integrators, v1 += u - q and v2 += v1 - q, with the
// quantizer q = clamp(round(v2), -4, 3) giving the 3-bit two's-complement
// output code. u is a sine of amplitude AMPL (in quantizer steps) at FREQ_HZ,
// sampled at FS_HZ. One output code per rising clock edge, cleared to 0
// while rst_n is low. With the integrator ordering used here the loop is
// stable for |u| up to about 2.5 steps.
module sd_modulator_model #(
  parameter real FS_HZ   = 32.0e6,
  parameter real FREQ_HZ = 100.0e3,
  parameter real AMPL    = 2.0
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic signed [2:0] q
);

  real v1, v2, u;
  int  n;

  initial begin
    v1 = 0.0;
    v2 = 0.0;
    n  = 0;
    q  = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      v1 = 0.0;
      v2 = 0.0;
      n  = 0;
      q  <= '0;
    end else begin
      int code;
      u  = AMPL * $sin(2.0 * 3.14159265358979 * FREQ_HZ * n / FS_HZ);
      v1 = v1 + u - real'(q);
      v2 = v2 + v1 - real'(q);
      code = int'($floor(v2 + 0.5));
      if (code > 3)  code = 3;
      if (code < -4) code = -4;
      q <= 3'(code);
      n++;
    end
  end

endmodule
