// iir_top: the two multiplier-less IIR filter structures side by side.
//
// df_*  : an order-6 filter in transposed direct form II (iir_df2t): two multiplier blocks, one on
//         the input for the numerator and one on the output for the denominator.
// cas_* : an order-8 filter as a cascade of four transposed second-order sections (iir_cascade),
//         with one merged multiplier block per junction between sections.
// Both share the clock and the synchronous reset and otherwise run independently. Each takes one
// sample per clock when its x_valid is high and presents the result one clock later.
// MAX_STEPS is the adder-step limit applied to every multiplier block (0 = none); its default of 3
// is this design's choice.
module iir_top #(
  parameter int XW        = 12,
  parameter int MAX_STEPS = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 df_x_valid,
  input  logic signed [XW-1:0] df_x,
  output logic                 df_y_valid,
  output logic signed [XW-1:0] df_y,
  input  logic                 cas_x_valid,
  input  logic signed [XW-1:0] cas_x,
  output logic                 cas_y_valid,
  output logic signed [XW-1:0] cas_y
);

  iir_df2t #(.XW(XW), .MAX_STEPS(MAX_STEPS)) u_df2t (
    .clk, .rst, .x_valid(df_x_valid), .x_i(df_x), .y_valid(df_y_valid), .y_o(df_y)
  );

  iir_cascade #(.XW(XW), .MAX_STEPS(MAX_STEPS)) u_cascade (
    .clk, .rst, .x_valid(cas_x_valid), .x_i(cas_x), .y_valid(cas_y_valid), .y_o(cas_y)
  );

endmodule
