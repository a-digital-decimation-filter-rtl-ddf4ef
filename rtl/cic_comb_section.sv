// cic_comb_section: the comb half of a CIC decimation filter.
//
// N first-order differentiators y = x[m] - x[m-1] in cascade, running at the
// decimated rate. A sample enters with in_valid high for one clock; the
// stages are separated by registers and each stage works in the clock cycle
// after the one before it, carrying a valid bit along, so each subtraction
// has a clock cycle of its own. A sample taken on clock edge e (in_valid
// high before it) gives a result registered on edge e + N - 1, with
// out_valid high for the one cycle after that edge. Arithmetic is two's complement
// modulo 2^W, which cancels the wrap-around of the integrators.
//
// Samples may arrive at most once every clock cycle; in the decimation
// filter they arrive once every D1 = 16 cycles. Reset (active low,
// synchronous) clears the delay registers, which matches a filter whose
// past inputs were all zero.
//
// The comb section and its place after the decimation follow the
// specification; the differential delay of 1, the word length and the
// pipelining are this design's choices.
module cic_comb_section #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] dly [N];   // previous input of each stage
  logic signed [W-1:0] y   [N];   // output register of each stage
  logic        [N-1:0] v;         // valid bit travelling with the sample

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        dly[k] <= '0;
        y[k]   <= '0;
      end
      v <= '0;
    end else begin
      v <= {v[N-2:0], in_valid};
      if (in_valid) begin
        y[0]   <= din - dly[0];
        dly[0] <= din;
      end
      for (int k = 1; k < N; k++) begin
        if (v[k-1]) begin
          y[k]   <= y[k-1] - dly[k];
          dly[k] <= y[k-1];
        end
      end
    end
  end

  assign dout      = y[N-1];
  assign out_valid = v[N-1];

endmodule
