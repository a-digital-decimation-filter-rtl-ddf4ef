// tb_filter_response: measures the magnitude response of the complete
// decimation filter (default size) against the required transfer function:
// passband ripple below 2 dB, a 3 dB point at 500 kHz and more than 50 dB
// of attenuation in the stopband.
//
// Tones are produced by second-order 3-bit sigma-delta modulator models
// (amplitude 2 quantizer steps, so a gain of 1 gives 2 * 4096 = 8192 at the
// output) and fed to the external input one after the other. For each tone
// the output is correlated with a sine and cosine at the frequency where the
// tone lands after decimation to 1 Msps (f folded into 0..500 kHz), over
// NMEAS outputs after the filter has settled.
//
// Limits checked: 100-420 kHz within +-1 dB of unity (2 dB ripple window);
// 480 kHz between -4 and -1 dB (just below the 3 dB corner at about
// 497 kHz); 640 kHz, 700 kHz, 1.3 MHz and 2.6 MHz at least 50 dB down.
module tb_filter_response;
  import decim_pkg::*;

  localparam int NT = 9;
  localparam real FREQ [NT] = '{100.0e3, 250.0e3, 350.0e3, 420.0e3, 480.0e3,
                                640.0e3, 700.0e3, 1.3e6, 2.6e6};
  // 0: passband, 1: corner, 2: stopband
  localparam int CLS [NT] = '{0, 0, 0, 0, 1, 2, 2, 2, 2};
  localparam int NSETTLE = 40, NMEAS = 600;
  localparam int SEG = 32 * (NSETTLE + NMEAS);

  logic clk = 0, rst_n = 0;
  logic sel_ext, obs_cic;
  logic signed [IN_W-1:0] mod_din, ext_din;
  logic signed [IN_W-1:0] tone [NT];
  logic signed [OUT_W-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int seg_idx = 0, seg_out = 0;
  real acc_c, acc_s;
  real gain_db [NT];

  decim_filter_top dut (.*);

  for (genvar i = 0; i < NT; i++) begin : g_tone
    sd_modulator_model #(.FREQ_HZ(FREQ[i]), .AMPL(2.0)) u_mod (.clk, .rst_n, .q(tone[i]));
  end

  assign mod_din = '0;
  assign sel_ext = 1'b1;
  assign obs_cic = 1'b0;
  assign ext_din = tone[seg_idx];

  always #5 clk = ~clk;

  initial begin
    #(10 * (NT * SEG + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Frequency in cycles per output sample after folding to 0..0.5.
  function automatic real folded(real f);
    real r;
    r = f / 1.0e6;
    r = r - $floor(r);
    if (r > 0.5) r = 1.0 - r;
    return r;
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n && dout_valid && seg_out >= NSETTLE && seg_out < NSETTLE + NMEAS) begin
      real ph;
      ph = 2.0 * 3.14159265358979 * folded(FREQ[seg_idx]) * seg_out;
      acc_c += real'(dout) * $cos(ph);
      acc_s += real'(dout) * $sin(ph);
    end
    if (rst_n && dout_valid) seg_out++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) begin
      seg_idx = i;
      seg_out = 0;
      acc_c = 0.0;
      acc_s = 0.0;
      repeat (SEG) @(negedge clk);
      gain_db[i] = 20.0 * $log10(2.0 * $sqrt(acc_c * acc_c + acc_s * acc_s) / NMEAS / 8192.0);
      $display("%9.0f Hz: %8.2f dB", FREQ[i], gain_db[i]);
      checks++;
      case (CLS[i])
        0: if (gain_db[i] < -1.0 || gain_db[i] > 1.0) begin
             failures++; $display("FAIL: passband gain outside +-1 dB");
           end
        1: if (gain_db[i] < -4.0 || gain_db[i] > -1.0) begin
             failures++; $display("FAIL: corner gain outside -4..-1 dB");
           end
        default: if (gain_db[i] > -50.0) begin
             failures++; $display("FAIL: stopband attenuation below 50 dB");
           end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
