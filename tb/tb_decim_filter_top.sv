// tb_decim_filter_top: end-to-end test of the decimation filter at its
// default size, every parameter as in the design.
//
// Stimulus, in four phases of the 32 MHz sample clock:
//   1. on-chip input selected: a second-order sigma-delta modulator model
//      coding a 100 kHz sine of 2 quantizer steps (passband);
//   2. external input selected: a second modulator model coding a 2.6 MHz
//      sine of the same amplitude (stopband; it aliases to 400 kHz at the
//      1 Msps output);
//   3. external input held at full scale: -4, then +3 (DC gain, largest
//      integrator values);
//   4. on-chip input selected again;
//   5. observation mode: dout shows the CIC output instead;
//   6. back to normal mode.
// Checks:
//   * every output equals a reference computed here from the selected input
//     samples: a direct convolution with the CIC impulse response, then the
//     FIR sum, rounding and clamping in 64-bit arithmetic;
//   * output m appears on clock edge 32m + 67, one every 32 input samples
//     (1 Msps from 32 Msps), and the CIC delivers one sample every 16;
//   * in observation mode each strobe on edge 16j + 19 shows CIC output j,
//     reduced to its 16 most significant bits;
//   * the 100 kHz tone comes out within 1 dB of 2 * 4096 (unity passband
//     gain) with an SNR above 74 dB (80 dB of range for a tone 6 dB below
//     full scale, modulator noise included), the 2.6 MHz tone at least 50 dB below that, and full-scale DC
//     at -4 * 4096 and +3 * 4096 within 0.5 %.
// Mechanisms counted, each a failure if it never happens: selection of each
// input source and the switches between them, CIC output strobes (decimation
// by 16), FIR output strobes (decimation by 2), integrator wrap-around, and
// observation mode entered and left.
module tb_decim_filter_top;
  import tb_ref_pkg::*;
  import decim_pkg::*;

  localparam int P1 = 20000, P2 = 40000, P3A = 46000, P3 = 52000, P4 = 60000,
                 P5 = 68000, PEND = 72000;

  logic clk = 0, rst_n = 0;
  logic sel_ext, obs_cic;
  logic signed [IN_W-1:0] mod_din, ext_din, ext_tone;
  logic signed [OUT_W-1:0] dout;
  logic dout_valid;

  int checks = 0, failures = 0;
  int edge_n = 0, nout = 0, ncic = 0, nwrap = 0, nsw_to_ext = 0, nsw_to_mod = 0;
  int n_mod_samples = 0, n_ext_samples = 0;
  int nobs = 0, exp_fir = 0, exp_obs = 0, nsw_to_obs = 0, nsw_from_obs = 0;
  logic obs_prev = 0;
  logic sel_prev = 0;
  longint s [$];          // selected input before each clock edge
  longint cic [$];        // reference CIC outputs
  longint y [$];          // outputs
  int     y_edge [$];
  int     y_m [$];
  longint h[];
  longint isum [N_INT];
  localparam int N_INT = CIC_N;

  decim_filter_top dut (.*);

  sd_modulator_model #(.FREQ_HZ(100.0e3),  .AMPL(2.0)) u_mod (.clk, .rst_n, .q(mod_din));
  sd_modulator_model #(.FREQ_HZ(2.6e6),    .AMPL(2.0)) u_ext (.clk, .rst_n, .q(ext_tone));

  always #5 clk = ~clk;

  initial begin
    #(10 * (PEND + 500));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference CIC output j: input sample t of the CIC is s[t-1] (the input
  // register), and output j covers CIC inputs up to 16j + 10.
  function automatic longint cic_ref(int j);
    longint e;
    int base;
    base = D1 * j + D1 - 1 - CIC_N;
    e = 0;
    foreach (h[k]) if (base - k - 1 >= 0) e += h[k] * s[base - k - 1];
    return e;
  endfunction

  // Record the selected sample at every edge and watch the internal strobes.
  always @(posedge clk) begin
    if (rst_n) begin
      longint v;
      v = sel_ext ? longint'(ext_din) : longint'(mod_din);
      s.push_back(v);
      if (sel_ext) n_ext_samples++; else n_mod_samples++;
      if (sel_ext && !sel_prev) nsw_to_ext++;
      if (!sel_ext && sel_prev) nsw_to_mod++;
      sel_prev <= sel_ext;
      // unbounded model of the last integrator, to count wrap-arounds
      isum[0] += v;
      for (int k = 1; k < N_INT; k++) isum[k] += isum[k-1];
      if (isum[N_INT-1] != wrap(isum[N_INT-1], CIC_W)) nwrap++;
      edge_n <= edge_n + 1;
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && dut.cic_valid) begin
      checks++;
      if (edge_n - 1 != D1 * ncic + D1 + CIC_N - 2) begin
        failures++;
        $display("CIC output %0d on edge %0d", ncic, edge_n - 1);
      end
      ncic++;
    end
    if (rst_n) begin
      int e;
      e = edge_n - 1;
      if (!obs_cic && e >= 67 && (e - 67) % 32 == 0) exp_fir++;
      if (obs_cic && e >= 19 && (e - 19) % 16 == 0) exp_obs++;
      if (obs_cic && !obs_prev) nsw_to_obs++;
      if (!obs_cic && obs_prev) nsw_from_obs++;
      obs_prev <= obs_cic;
    end
    if (rst_n && dout_valid && obs_cic) begin
      int e, jj;
      longint ev;
      e = edge_n - 1;
      jj = (e - 19) / 16;
      checks++;
      if (e < 19 || (e - 19) % 16 != 0) begin
        failures++;
        $display("observed CIC strobe on edge %0d", e);
      end else begin
        ev = cic_ref(jj) >>> (CIC_W - OUT_W);
        checks++;
        if (longint'(dout) != ev) begin
          failures++;
          if (failures < 10) $display("observed CIC %0d: %0d expected %0d", jj, dout, ev);
        end
      end
      nobs++;
    end
    if (rst_n && dout_valid && !obs_cic) begin
      longint acc, ev;
      int newest, e, m;
      bit clamped;
      e = edge_n - 1;
      m = (e - 67) / 32;
      checks++;
      if (e < 67 || (e - 67) % 32 != 0) begin
        failures++;
        if (failures < 10) $display("output on edge %0d, not of the form 32m + 67", e);
      end
      newest = D2 * m + D2 - 1;
      while (cic.size() <= newest) cic.push_back(cic_ref(cic.size()));
      acc = 0;
      for (int k = 0; k < FIR_TAPS; k++)
        if (newest - k >= 0) acc += longint'(FIR_COEFS[k]) * cic[newest - k];
      ev = round_clamp(acc, OUT_SHIFT, OUT_W, clamped);
      checks++;
      if (longint'(dout) != ev) begin
        failures++;
        if (failures < 10) $display("out %0d: %0d expected %0d", m, dout, ev);
      end
      y.push_back(longint'(dout));
      y_edge.push_back(e);
      y_m.push_back(m);
      nout++;
    end
  end

  // Amplitude of the tone at f_out (cycles per output sample) over outputs
  // whose edge lies in [e0, e1).
  function automatic real tone_ampl(int e0, int e1, real f_out);
    real c, sn;
    int n;
    c = 0.0; sn = 0.0; n = 0;
    foreach (y[i]) if (y_edge[i] >= e0 && y_edge[i] < e1) begin
      c  += real'(y[i]) * $cos(2.0 * 3.14159265358979 * f_out * y_m[i]);
      sn += real'(y[i]) * $sin(2.0 * 3.14159265358979 * f_out * y_m[i]);
      n++;
    end
    return 2.0 * $sqrt(c * c + sn * sn) / n;
  endfunction

  // Signal-to-noise ratio in dB of a tone at f_out over outputs in [e0, e1):
  // the tone and the DC level are fitted by correlation and the rest counted
  // as noise.
  function automatic real snr_db(int e0, int e1, real f_out);
    real c, sn, dc, ps, pn, r, ph;
    int n;
    c = 0.0; sn = 0.0; dc = 0.0; n = 0; pn = 0.0;
    foreach (y[i]) if (y_edge[i] >= e0 && y_edge[i] < e1) begin
      ph = 2.0 * 3.14159265358979 * f_out * y_m[i];
      c  += real'(y[i]) * $cos(ph);
      sn += real'(y[i]) * $sin(ph);
      dc += real'(y[i]);
      n++;
    end
    c = 2.0 * c / n; sn = 2.0 * sn / n; dc = dc / n;
    foreach (y[i]) if (y_edge[i] >= e0 && y_edge[i] < e1) begin
      ph = 2.0 * 3.14159265358979 * f_out * y_m[i];
      r  = real'(y[i]) - dc - c * $cos(ph) - sn * $sin(ph);
      pn += r * r;
    end
    ps = (c * c + sn * sn) / 2.0;
    return 10.0 * $log10(ps / (pn / n));
  endfunction

  function automatic real mean_out(int e0, int e1);
    real m;
    int n;
    m = 0.0; n = 0;
    foreach (y[i]) if (y_edge[i] >= e0 && y_edge[i] < e1) begin
      m += real'(y[i]);
      n++;
    end
    return m / n;
  endfunction

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real a_pass, a_stop, dc_neg, dc_pos, snr;
    cic_kernel(CIC_N, D1, h);
    foreach (isum[k]) isum[k] = 0;
    sel_ext = 0;
    obs_cic = 0;
    ext_din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < PEND; t++) begin
      if (t < P1)       begin sel_ext = 0; ext_din = ext_tone; end
      else if (t < P2)  begin sel_ext = 1; ext_din = ext_tone; end
      else if (t < P3A) begin sel_ext = 1; ext_din = -3'sd4; end
      else if (t < P3)  begin sel_ext = 1; ext_din = 3'sd3; end
      else              begin sel_ext = 0; ext_din = ext_tone; end
      obs_cic = (t >= P4 && t < P5);
      @(negedge clk);
    end
    // Each phase is measured over 500 outputs (50 periods of 100 kHz,
    // 200 periods of 400 kHz) once the filter has settled.
    a_pass = tone_ampl(P1 - 16000, P1,  0.1);
    a_stop = tone_ampl(P2 - 16000, P2,  0.4);
    snr    = snr_db(P1 - 16000, P1, 0.1);
    dc_neg = mean_out(P3A - 3000, P3A);
    dc_pos = mean_out(P3 - 3000, P3);
    $display("SNR of the 100 kHz tone: %.1f dB", snr);
    $display("passband tone %.1f, stopband tone %.3f (%.1f dB), DC %.1f / %.1f",
             a_pass, a_stop, 20.0 * $log10(a_stop / 8192.0), dc_neg, dc_pos);
    expect_true(a_pass > 8192.0 * 0.891 && a_pass < 8192.0 * 1.122, "passband gain within 1 dB");
    expect_true(a_stop < 8192.0 * 0.00316, "stopband attenuation above 50 dB");
    // 80 dB of dynamic range relative to full scale (4 steps) means at
    // least 74 dB of SNR for this tone of 2 steps (-6 dB).
    expect_true(snr > 74.0, "SNR of a -6 dB tone above 74 dB (80 dB dynamic range)");
    expect_true(dc_neg < -16384.0 * 0.995 && dc_neg > -16384.0 * 1.005, "DC gain at -4");
    expect_true(dc_pos > 12288.0 * 0.995 && dc_pos < 12288.0 * 1.005, "DC gain at +3");
    expect_true(nout == exp_fir && nout > 0, "filter output count: one per 32 input samples");
    expect_true(nobs == exp_obs && nobs > 0, "observed CIC count: one per 16 input samples");
    expect_true(nsw_to_obs > 0 && nsw_from_obs > 0, "observation mode entered and left");
    expect_true(ncic == (PEND - 1 - 19) / 16 + 1, "CIC output count: one per 16 input samples");
    expect_true(n_mod_samples > 0 && n_ext_samples > 0, "both input sources used");
    expect_true(nsw_to_ext > 0 && nsw_to_mod > 0, "source switched both ways");
    expect_true(nwrap > 0, "integrator wrap-around occurred");
    $display("outputs=%0d observed=%0d cic=%0d switches=%0d/%0d obs=%0d/%0d wraps=%0d",
             nout, nobs, ncic, nsw_to_ext, nsw_to_mod, nsw_to_obs, nsw_from_obs, nwrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
