// cic_decimator: Cascaded Integrator-Comb lowpass filter with decimation by D.
//
// The filter is an integrator section at the input rate, a decimator that
// keeps one integrator output in D, and a comb section at the decimated rate,
// with as many combs as integrators. Its transfer function is
//   H(z) = ((1 - z^-D) / (1 - z^-1))^N,  DC gain D^N,
// built from adders and registers only.
//
// Interface: one IN_W-bit two's-complement sample per clock on din (the clock
// is the input sample clock, 32 MHz in the decimation filter). Every D clocks
// a W-bit result appears on dout with out_valid high for one cycle.
// W = IN_W + N*log2(D) holds the full gain, so nothing is lost.
//
// Timing: counting input samples x[t] from the first clock edge after reset,
// output number m (m = 0, 1, ...) is
//   y[m] = sum_k h[k] * x[D*m + D - 1 - N - k],
// where h is the impulse response of H(z) (length N*(D-1)+1), and it is
// registered on clock edge D*m + D + N - 2 (out_valid high for the cycle
// after that edge). The decimation phase counter is cleared by
// the active-low synchronous reset.
//
// The three-part structure and D = 16 follow the specification; N = 5,
// differential delay 1 and the word length are this design's choices
// (N = 5 is what lets the whole chain, with a 31-tap FIR, stay 50 dB down
// everywhere above 640 kHz).
module cic_decimator #(
  parameter int unsigned N    = 5,
  parameter int unsigned D    = 16,
  parameter int unsigned IN_W = 3,
  parameter int unsigned W    = IN_W + N * $clog2(D)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] din,
  output logic                   out_valid,
  output logic signed [W-1:0]    dout
);

  logic signed [W-1:0]     integ;
  logic [$clog2(D)-1:0]    phase;
  logic                    take;

  cic_integrator_section #(.N(N), .IN_W(IN_W), .W(W)) u_integ (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (din),
    .dout (integ)
  );

  // Decimation by D: pass one integrator output in D to the combs.
  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else if (take) phase <= '0;
    else phase <= phase + 1'b1;
  end

  assign take = (phase == ($clog2(D))'(D - 1));

  cic_comb_section #(.N(N), .W(W)) u_comb (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (take),
    .din      (integ),
    .out_valid(out_valid),
    .dout     (dout)
  );

endmodule
