// tdf2_core: the adder/delay column of a transposed direct form II IIR filter of order N.
//
// The multiplications are done outside, in multiplier blocks; this module receives the products
// and does the additions and the unit delays:
//     acc      = bp[0] + s[1]                     (combinational)
//     y        = saturate(acc >>> FRAC)           (combinational, YW bits)
//     s[k]    <= bp[k] + ap[k] + s[k+1], k < N    (on en)
//     s[N]    <= bp[N] + ap[N]
// where bp[k] = b_k * x and ap[k] = a_k * y are integer products at the coefficient scale 2**FRAC.
// The feedback coefficients are taken with the sign with which they enter the adders, so the
// transfer function is H(z) = sum b_k z^-k / (1 - sum a_k z^-k) with coefficients scaled by
// 2**-FRAC. ap depends on y within the same cycle, but only feeds the state registers, so there
// is no combinational loop. y is floored (arithmetic shift) and saturated to YW bits.
// The structure follows the transposed direct form II; the widths, the truncation, the
// saturation, the enable and the synchronous reset of the states to zero are this design's own.
//
// Timing: y is valid in the cycle x (and hence bp) is presented; one sample per enabled cycle.
module tdf2_core #(
  parameter int N    = 2,    // filter order (number of delays)
  parameter int PW   = 20,   // width of the incoming products
  parameter int GW   = 4,    // guard bits of the state registers over PW
  parameter int FRAC = 6,    // fractional bits of the coefficients
  parameter int YW   = 12    // output width
) (
  input  logic                 clk,
  input  logic                 rst,   // synchronous, clears the states
  input  logic                 en,    // advance one sample
  input  logic signed [PW-1:0] bp [N+1],  // b_k * x, k = 0..N
  input  logic signed [PW-1:0] ap [N+1],  // a_k * y, k = 1..N (ap[0] unused)
  output logic signed [YW-1:0] y
);

  localparam int SW = PW + GW;
  localparam logic signed [SW-1:0] YMAX = SW'((longint'(1) <<< (YW - 1)) - 1);
  localparam logic signed [SW-1:0] YMIN = -SW'(longint'(1) <<< (YW - 1));

  logic signed [SW-1:0] s [1:N+1];   // s[N+1] is a constant zero to keep the update uniform
  logic signed [SW-1:0] acc, accs;

  assign s[N+1] = '0;
  assign acc    = SW'(bp[0]) + s[1];
  assign accs   = acc >>> FRAC;

  always_comb begin
    if (accs > YMAX)      y = YMAX[YW-1:0];
    else if (accs < YMIN) y = YMIN[YW-1:0];
    else                  y = accs[YW-1:0];
  end

  for (genvar k = 1; k <= N; k++) begin : g_state
    always_ff @(posedge clk) begin
      if (rst)     s[k] <= '0;
      else if (en) s[k] <= SW'(bp[k]) + SW'(ap[k]) + s[k+1];
    end
  end

endmodule
