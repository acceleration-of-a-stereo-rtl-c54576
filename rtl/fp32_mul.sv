// fp32_mul -- combinational IEEE-754 single-precision multiplier.
//
// Used by the ConvRepl engines for the product term of each convolution tap.
// Like the reduced software float library the original engines were built
// from, it rounds to nearest-even only and handles no exceptions: operands
// with a zero exponent field count as zero (subnormals are flushed), a result
// that underflows is flushed to a signed zero, one that overflows becomes a
// signed infinity, and exponent 255 is not recognised as Inf/NaN on input.
// The flush-to-zero and overflow choices are this design's own.
//
// Datapath: 24x24-bit significand product, one-bit normalisation, guard and
// sticky from the discarded bits, round-to-nearest-even, carry re-normalise.
// Interface: a, b in; y out, no clock.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sign;
  logic [47:0] prod;
  logic [22:0] frac;
  logic        guard, sticky, round_up;
  logic [24:0] rounded;             // {carry, hidden, 23 fraction bits}
  logic signed [10:0] exp_unb;      // biased exponent before range checks

  always_comb begin
    sign    = a[31] ^ b[31];
    prod    = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp_unb = 11'(signed'({3'b000, a[30:23]})) + 11'(signed'({3'b000, b[30:23]})) - 11'sd127;
    if (prod[47]) begin
      frac    = prod[46:24];
      guard   = prod[23];
      sticky  = |prod[22:0];
      exp_unb = exp_unb + 11'sd1;
    end else begin
      frac    = prod[45:23];
      guard   = prod[22];
      sticky  = |prod[21:0];
    end
    round_up = guard & (sticky | frac[0]);
    rounded  = {2'b01, frac} + 25'(round_up);
    if (rounded[24]) begin
      exp_unb = exp_unb + 11'sd1;
      rounded = rounded >> 1;
    end

    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || exp_unb <= 11'sd0)
      y = {sign, 31'd0};
    else if (exp_unb >= 11'sd255)
      y = {sign, 8'hFF, 23'd0};
    else
      y = {sign, exp_unb[7:0], rounded[22:0]};
  end

endmodule
