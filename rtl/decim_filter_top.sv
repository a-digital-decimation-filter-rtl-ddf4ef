// decim_filter_top: digital lowpass decimation filter for a 32x oversampled
// second-order sigma-delta modulator with a 3-bit output (Bluetooth receiver
// target: 500 kHz bandwidth, 32 Msps in, 1 Msps out).
//
// Data path:
//   source select -> input register -> CIC, 5 stages, /16 -> FIR, 31 taps, /2
// The 3-bit sample comes either from the on-chip modulator (mod_din) or, as a
// backup, from an external input pin (ext_din); sel_ext chooses the external
// one. The selected sample is registered once, then filtered by the CIC
// (32 Msps -> 2 Msps) and by the FIR, which also halves the rate
// (2 Msps -> 1 Msps). Everything runs on the single 32 MHz sample clock; the
// slower parts use clock enables (valid strobes), not divided clocks.
//
// Observation mode: the specification asks for off-chip access to the most
// important internal nodes. With obs_cic high, dout and dout_valid carry the
// CIC output instead (its 16 most significant bits, -4 * 2^20 >> 7 = -32768
// at full scale, 2 Msps), so the two filters can be tested apart. Both
// sources are registered, so the selection adds no latency.
//
// Interface: clk is the 32 MHz sample clock; rst_n is an active-low
// synchronous reset. Samples are 3-bit two's complement (-4..3). In normal
// mode dout is a 16-bit two's-complement result with dout_valid high for one
// clock every 32 clocks. A constant full-scale input of -4 gives -16348
// (-4 * 4096 times the FIR DC gain of 0.998), so there is one bit of
// headroom for overshoot, beyond which the output saturates.
//
// Latency: counting clock edges from the first one with reset released
// (edge 0), the sample present on the selected input before edge t enters
// the CIC on edge t + 1. CIC output j is registered on edge 16j + 19 and
// covers inputs up to the one sampled on edge 16j + 9; FIR output m is
// computed from CIC outputs up to 2m + 1, whose strobe is taken on edge
// 32m + 36, and is registered 31 edges after that, on edge 32m + 67, with
// dout_valid high for the cycle after it.
//
// The two-stage structure, the rates, the decimation factors and the backup
// input follow the specification; the filter orders, coefficients, word
// lengths, the input register and the form of the observation mode are this
// design's choices.
module decim_filter_top
  import decim_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sel_ext,    // 1: use ext_din, 0: use mod_din
  input  logic signed [IN_W-1:0]  mod_din,    // from the sigma-delta modulator
  input  logic signed [IN_W-1:0]  ext_din,    // external backup input
  input  logic                    obs_cic,    // 1: dout shows the CIC output
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);

  in_sample_t  x_q;
  cic_word_t   cic_out;
  logic        cic_valid;
  out_sample_t fir_out;
  logic        fir_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) x_q <= '0;
    else        x_q <= sel_ext ? ext_din : mod_din;
  end

  cic_decimator #(.N(CIC_N), .D(D1), .IN_W(IN_W), .W(CIC_W)) u_cic (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (x_q),
    .out_valid(cic_valid),
    .dout     (cic_out)
  );

  fir_decimator u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (cic_valid),
    .din      (cic_out),
    .out_valid(fir_valid),
    .dout     (fir_out)
  );

  // Output selection: filter output, or the CIC output for observation.
  always_comb begin
    if (obs_cic) begin
      dout       = cic_out[CIC_W-1 -: OUT_W];
      dout_valid = cic_valid;
    end else begin
      dout       = fir_out;
      dout_valid = fir_valid;
    end
  end

endmodule
