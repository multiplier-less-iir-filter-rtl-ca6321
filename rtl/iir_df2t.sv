// iir_df2t: IIR filter of order N in transposed direct form II, built multiplier-less.
//
// All feed-forward products b_k * x[n] come from one multiplier block driven by the input, and
// all feedback products a_k * y[n] from a second multiplier block driven by the output; between
// them a column of N adders/delays (tdf2_core) accumulates the products. This is the structure in
// which a direct-form filter's multiplications merge into two shared shift-add blocks.
//     y[n] = sum_{k=0..N} b_k x[n-k] + sum_{k=1..N} a_k y[n-k]   (coefficients / 2**FRAC)
// B and A are signed CW-bit integers; A carries the sign with which it is added. MAX_STEPS is the
// adder-step limit passed to both multiplier blocks (0 = none); the default of 3 is this design's
// choice (the published results span 2 to 7 adder-steps).
// The order (7 taps) and coefficient width (10 bits) follow the published test filter 3; the
// default coefficient values (a Butterworth low-pass, cutoff at half the Nyquist frequency,
// quantized to 8 fractional bits), the 12-bit sample width and the output register are this
// design's own.
//
// Interface/timing: x_i is taken when x_valid is high; y_o and y_valid follow one clock later.
// One sample per clock. The combinational path is the x-side multiplier block plus one adder, and
// from y through the feedback block and two adders into the states.
module iir_df2t #(
  parameter int XW        = 12,
  parameter int CW        = 10,
  parameter int N         = 6,
  parameter int FRAC      = 8,
  parameter int B [N+1]   = '{8, 45, 114, 151, 114, 45, 8},
  parameter int A [N]     = '{0, -199, 0, -29, 0, 0},
  parameter int MAX_STEPS = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x_i,
  output logic                 y_valid,
  output logic signed [XW-1:0] y_o
);

  localparam int PW = XW + CW;

  logic signed [PW-1:0] bp [N+1];
  logic signed [PW-1:0] af [N];
  logic signed [PW-1:0] ap [N+1];
  logic signed [XW-1:0] y;

  mult_block #(.XW(XW), .CW(CW), .NC(N+1), .COEF(B), .MAX_STEPS(MAX_STEPS)) u_mb_b (
    .x(x_i), .prod(bp)
  );

  mult_block #(.XW(XW), .CW(CW), .NC(N), .COEF(A), .MAX_STEPS(MAX_STEPS)) u_mb_a (
    .x(y), .prod(af)
  );

  always_comb begin
    ap[0] = '0;
    for (int k = 1; k <= N; k++) ap[k] = af[k-1];
  end

  tdf2_core #(.N(N), .PW(PW), .FRAC(FRAC), .YW(XW)) u_core (
    .clk, .rst, .en(x_valid), .bp, .ap, .y
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      y_valid <= 1'b0;
      y_o     <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y_o <= y;
    end
  end

endmodule
