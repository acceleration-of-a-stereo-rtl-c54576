// fp32_add -- combinational IEEE-754 single-precision adder.
//
// Accumulates the tap products in the ConvRepl engines. Rounding is
// round-to-nearest-even only and there is no exception handling, as in the
// cut-down software float library the original engines came from. A zero
// exponent field counts as zero (subnormals flushed), results that underflow
// flush to zero, overflow gives a signed infinity; these limits are this
// design's own choice.
//
// Datapath: order the operands by magnitude, align the smaller one with
// guard/round/sticky bits, add or subtract the 27-bit significands,
// normalise (right by one after a carry, left by the leading-zero count after
// cancellation), then round to nearest-even. An exact cancellation gives +0;
// the sum of two zeros is -0 only if both are -0.
// Interface: a, b in; y out, no clock.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] opa, opb;              // larger and smaller magnitude
  logic        a_zero, b_zero;
  logic [7:0]  shamt;
  logic [26:0] ma, mb, shifted;     // {hidden, 23 fraction, guard, round, sticky}
  logic        lost;
  logic [27:0] sum;
  logic [26:0] norm;
  logic signed [9:0] exp_r;
  logic [4:0]  lz;
  logic        round_up;
  logic [24:0] rounded;

  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    if (a[30:0] >= b[30:0]) begin
      opa = a; opb = b;
    end else begin
      opa = b; opb = a;
    end

    ma    = {1'b1, opa[22:0], 3'b000};
    mb  = {1'b1, opb[22:0], 3'b000};
    shamt   = opa[30:23] - opb[30:23];
    lost    = 1'b0;
    if (shamt >= 8'd27) begin
      shifted = 27'd1;                    // only the sticky bit survives
    end else begin
      shifted = mb >> shamt;
      lost    = |(mb & ~(27'h7FFFFFF << shamt));
      shifted[0] = shifted[0] | lost;
    end

    exp_r = 10'(signed'({2'b00, opa[30:23]}));
    if (opa[31] == opb[31]) sum = {1'b0, ma} + {1'b0, shifted};
    else                      sum = {1'b0, ma} - {1'b0, shifted};

    lz = 5'd0;
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = norm[0] | sum[0];
      exp_r = exp_r + 10'sd1;
    end else begin
      for (int k = 26; k >= 0; k--) begin
        if (sum[k]) begin
          lz = 5'(26 - k);
          break;
        end
      end
      norm  = sum[26:0] << lz;
      exp_r = exp_r - 10'(lz);
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rounded  = {1'b0, norm[26:3]} + 25'(round_up);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      exp_r   = exp_r + 10'sd1;
    end

    if (a_zero && b_zero)
      y = {a[31] & b[31], 31'd0};
    else if (b_zero)
      y = a;
    else if (a_zero)
      y = b;
    else if (sum == 28'd0 || exp_r <= 10'sd0)
      y = 32'd0;
    else if (exp_r >= 10'sd255)
      y = {opa[31], 8'hFF, 23'd0};
    else
      y = {opa[31], exp_r[7:0], rounded[22:0]};
  end

endmodule
