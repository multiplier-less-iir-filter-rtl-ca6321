// iir_cascade: IIR filter as a cascade of NSEC second-order sections, transposed, multiplier-less.
//
// Section s computes y_s = (b0 u + s1), with states s1 <= b1 u + a1 y_s + s2 and
// s2 <= b2 u + a2 y_s, where u is the section input (x for the first section, y_{s-1} otherwise).
// The output of section s is therefore multiplied both by its own feedback coefficients a1, a2 and
// by the feed-forward coefficients b0, b1, b2 of section s+1. All those products of one signal are
// merged into one multiplier block per junction:
//     junction 0      : x        -> b0, b1, b2 of section 0                 (3 products)
//     junction s      : y_{s-1}  -> a1, a2 of section s-1, b0..b2 of s      (5 products)
//     junction NSEC   : y        -> a1, a2 of the last section              (2 products)
// Each section's adder/delay column is a tdf2_core of order 2. Coefficients are signed CW-bit
// integers with FRAC fractional bits; A carries the sign with which it is added. MAX_STEPS is the
// adder-step limit of every junction block (0 = none); the default of 3 is this design's choice. Each section
// output is floored and saturated to XW bits before it feeds the next junction.
// The section count (order 8, 9 taps) and the 8-bit coefficient width follow the published test
// filter 1; the default coefficient values (an order-8 Butterworth low-pass, cutoff at a quarter of
// the Nyquist frequency, 6 fractional bits, each section scaled to unity DC gain), the sample width
// and the output register are this design's own.
//
// Interface/timing: x_i is taken when x_valid is high; y_o and y_valid follow one clock later.
// One sample per clock; the combinational path from x_i runs through every section.
module iir_cascade #(
  parameter int XW         = 12,
  parameter int CW         = 8,
  parameter int NSEC       = 4,
  parameter int FRAC       = 6,
  // Section s uses B[3s..3s+2] = b0, b1, b2 and A[2s..2s+1] = a1, a2.
  parameter int B [NSEC*3] = '{6, 12, 6,  6, 12, 6,  7, 14, 7,  8, 16, 8},
  parameter int A [NSEC*2] = '{53, -12,  57, -17,  65, -28,  80, -48},
  parameter int MAX_STEPS  = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x_i,
  output logic                 y_valid,
  output logic signed [XW-1:0] y_o
);

  localparam int PW = XW + CW;

  // Section s (block g_sec[s]) holds the multiplier block of its input junction, which forms its
  // own b products and the a products of section s-1, and its adder/delay column. The a products
  // of the last section come from g_last. Each section keeps its own signals, so no array ties
  // the sections' combinational paths together.
  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    logic signed [XW-1:0] u;        // section input
    logic signed [XW-1:0] ys;       // section output
    logic signed [PW-1:0] bp [3];   // b0, b1, b2 products of u
    logic signed [PW-1:0] ap [3];   // a1, a2 products of ys (index 0 unused)

    if (s == 0) begin : g_in
      localparam int C [3] = '{B[0], B[1], B[2]};
      assign u = x_i;
      mult_block #(.XW(XW), .CW(CW), .NC(3), .COEF(C), .MAX_STEPS(MAX_STEPS)) u_mb (
        .x(u), .prod(bp)
      );
    end else begin : g_in
      localparam int C [5] = '{A[2*s-2], A[2*s-1], B[3*s], B[3*s+1], B[3*s+2]};
      logic signed [PW-1:0] p [5];
      logic signed [PW-1:0] ain [2];  // a1, a2 products of u, for section s-1
      assign u = g_sec[s-1].ys;
      mult_block #(.XW(XW), .CW(CW), .NC(5), .COEF(C), .MAX_STEPS(MAX_STEPS)) u_mb (
        .x(u), .prod(p)
      );
      assign ain = '{p[0], p[1]};
      assign bp  = '{p[2], p[3], p[4]};
    end

    if (s == NSEC - 1) begin : g_fb
      assign ap = '{'0, g_last.p[0], g_last.p[1]};
    end else begin : g_fb
      assign ap = '{'0, g_sec[s+1].g_in.ain[0], g_sec[s+1].g_in.ain[1]};
    end

    tdf2_core #(.N(2), .PW(PW), .FRAC(FRAC), .YW(XW)) u_core (
      .clk, .rst, .en(x_valid), .bp, .ap, .y(ys)
    );
  end

  // Last junction: the filter output times a1, a2 of the last section.
  if (1) begin : g_last
    localparam int C [2] = '{A[2*NSEC-2], A[2*NSEC-1]};
    logic signed [PW-1:0] p [2];
    mult_block #(.XW(XW), .CW(CW), .NC(2), .COEF(C), .MAX_STEPS(MAX_STEPS)) u_mb (
      .x(g_sec[NSEC-1].ys), .prod(p)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_valid <= 1'b0;
      y_o     <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y_o <= g_sec[NSEC-1].ys;
    end
  end

endmodule
