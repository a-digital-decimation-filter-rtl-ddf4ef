// cic_integrator_section: the integrator half of a CIC decimation filter.
//
// N accumulators in cascade, all clocked at the full input rate (32 Msps):
// one new input sample is taken on every rising clock edge. Each stage adds
// the registered output of the stage before it, so every adder has a register
// at its output and the critical path is a single W-bit addition; this adds a
// pure delay of N-1 samples to the textbook cascade and changes nothing else.
// The registers wrap around in two's complement on overflow. This is
// intended: with W = IN_W + N*log2(D) bits the comb section that follows
// removes the wrap-around exactly, as for any CIC filter.
//
// Timing: dout after clock edge t holds
//   z^-(N-1) / (1 - z^-1)^N  applied to the inputs up to and including edge t.
// Reset (active low, synchronous) clears all accumulators.
//
// The integrator section and its place before the decimation follow the
// specification; the stage count, word length and pipelining are this
// design's choices.
module cic_integrator_section #(
  parameter int unsigned N    = 5,
  parameter int unsigned IN_W = 3,
  parameter int unsigned W    = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [IN_W-1:0] din,
  output logic signed [W-1:0]    dout
);

  logic signed [W-1:0] acc [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) acc[k] <= '0;
    end else begin
      acc[0] <= acc[0] + W'(din);   // sign-extending cast
      for (int k = 1; k < N; k++) acc[k] <= acc[k] + acc[k-1];
    end
  end

  assign dout = acc[N-1];

endmodule
