// fir_decimator: FIR lowpass filter followed by decimation by D2.
//
// The filter computes only the outputs that survive the decimation: of every
// D2 input samples it stores all of them and, on the last one, starts one
// convolution with the TAPS coefficients. The convolution is serial, one
// multiply-accumulate per clock, so one multiplier and one adder do the
// whole filter; TAPS clocks later the sum is rounded (half up), scaled down
// by SHIFT bits, saturated to OW bits and presented on dout with out_valid
// high for one cycle.
//
// Input samples are stored in a circular buffer of DEPTH = 2^clog2(TAPS+1)
// words addressed by a write pointer; the convolution reads backwards from
// the newest sample. Because DEPTH > TAPS, a sample that arrives while a
// convolution is running (at most DEPTH - TAPS of them may, one with D2 = 2)
// overwrites only a sample it no longer needs.
//
// Interface and timing: a W-bit sample on din with in_valid high for one
// clock. A new convolution must not start before the previous one has
// finished, so D2 input samples must span at least TAPS clocks: with D2 = 2
// and one input every 16 clocks (the CIC output rate) there are 32 clocks
// per output and the convolution takes TAPS = 31. An assertion checks this.
// Counting input samples c[j] from reset, output number m is
//   y[m] = sat(round(sum_k COEFS[k] * c[D2*m + D2 - 1 - k] / 2^SHIFT)),
// with c[j] = 0 for j < 0, and it leaves TAPS clocks after c[D2*m + D2 - 1]
// was taken. Reset (active low, synchronous) clears the buffer, pointer and
// decimation phase.
//
// The FIR filter and the decimation by 2 at the output follow the
// specification. The serial architecture, the coefficients (see decim_pkg)
// and the rounding and saturation are this design's choices.
module fir_decimator
  import decim_pkg::*;
#(
  parameter int unsigned TAPS  = FIR_TAPS,
  parameter int unsigned DEC   = D2,
  parameter int unsigned W     = CIC_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned AW    = ACC_W,
  parameter int unsigned OW    = OUT_W,
  parameter int unsigned SHIFT = OUT_SHIFT,
  parameter logic signed [CW-1:0] COEFS [TAPS] = FIR_COEFS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  din,
  output logic                 out_valid,
  output logic signed [OW-1:0] dout
);

  localparam int unsigned PW    = $clog2(TAPS + 1);   // buffer address width
  localparam int unsigned DEPTH = 1 << PW;
  localparam int unsigned KW    = $clog2(TAPS);
  localparam int unsigned DW    = (DEC > 1) ? $clog2(DEC) : 1;

  logic signed [W-1:0]  buf_q [DEPTH];
  logic [PW-1:0]        wr_ptr;
  logic [PW-1:0]        base;      // address of the newest sample in use
  logic [DW-1:0]        dphase;    // decimation phase
  logic [KW-1:0]        tap;
  logic                 busy;
  logic                 start;
  logic                 last;
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] sum;
  logic signed [W+CW-1:0] prod;

  assign start = in_valid && (dphase == DW'(DEC - 1));
  assign last  = busy && (tap == KW'(TAPS - 1));

  // One product per clock: coefficient k times the sample k positions back.
  assign prod = buf_q[base - PW'(tap)] * COEFS[tap];
  assign sum  = acc + AW'(prod);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
      wr_ptr    <= '0;
      base      <= '0;
      dphase    <= '0;
      tap       <= '0;
      busy      <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        buf_q[wr_ptr] <= din;
        wr_ptr        <= wr_ptr + 1'b1;
        dphase        <= start ? '0 : dphase + 1'b1;
      end
      if (busy) begin
        acc <= sum;
        tap <= tap + 1'b1;
        if (last) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          dout      <= round_sat(sum);
        end
      end
      if (start) begin
        base <= wr_ptr;
        tap  <= '0;
        acc  <= '0;
        busy <= 1'b1;
      end
    end
  end

  // Round half up, drop SHIFT bits, saturate to OW bits.
  function automatic logic signed [OW-1:0] round_sat(logic signed [AW-1:0] a);
    logic signed [AW:0] r;
    r = ((AW+1)'(a) + ((AW+1)'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (r > (AW+1)'(2**(OW-1) - 1))       return {1'b0, {(OW-1){1'b1}}};
    else if (r < -((AW+1)'(2**(OW-1)))) return {1'b1, {(OW-1){1'b0}}};
    else                                 return r[OW-1:0];
  endfunction

  // A new convolution may only start once the previous one is finishing.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> (!busy || last))
    else $error("fir_decimator: input samples arrive faster than the filter can compute");

endmodule
