// Multiple-input signature register (MISR) that compacts the per-cycle
// results of the local response analyzers into one signature.
//
// Each enabled cycle the register shifts one place towards the MSB with
// feedback of its MSB through the polynomial taps, and the WIDTH input bits
// are XORed in. Starting from zero, a fault-free run (all inputs zero)
// leaves the signature at zero; any error leaves a nonzero signature with
// high probability. clear restarts from zero.
// The document names the MISR only; the width and the polynomial
// x^16 + x^12 + x^3 + x + 1 are this design's choices.
module misr #(
  parameter int unsigned     WIDTH = 16,
  parameter logic [WIDTH-1:0] POLY = WIDTH'(17'h1100B)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[WIDTH-2:0], 1'b0} ^ (sig[WIDTH-1] ? POLY : '0) ^ d;
  end

endmodule
