// ro_array_model -- behavioural model of an array of ring oscillators.
//
// Oscillator i is a phase accumulator advanced by inc[i] on every falling
// edge of the sampling clock; its output is the accumulator's top bit, so it
// runs at inc[i] / 2^32 times the clock rate (keep inc below 2^31). The
// testbench sets `inc` hierarchically to model manufacturing variation and
// temperature drift. Updating on the falling edge keeps the outputs stable
// around the rising edges that sample them.
module ro_array_model #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  output logic [N-1:0] ro
);
  logic [31:0] inc [N];
  logic [31:0] ph  [N];

  initial
    for (int i = 0; i < N; i++) begin
      inc[i] = 32'h1000_0000;
      ph[i]  = 32'(i) << 20;
    end

  always @(negedge clk)
    for (int i = 0; i < N; i++) ph[i] <= ph[i] + inc[i];

  always_comb
    for (int i = 0; i < N; i++) ro[i] = ph[i][31];
endmodule
