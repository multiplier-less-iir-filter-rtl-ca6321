// tb_mult_block: self-checking test of the multiplier block.
//
// Instances and what they show:
//   dut1  plain CSD trees (SHARE off), 12-bit coefficients: trees of up to five digits
//         (797 = 1024 - 256 + 32 - 4 + 1), equal magnitudes, zero, powers of two, both signs.
//         Adders and adder-steps are compared with counts made here from the CSD digits.
//   dut2  the block's defaults {6, 12, 6}: one fundamental, 3 = 4 - 1, one adder, one step.
//   dut3  an explicit shared graph (7x, 105x = 15 * 7x, 15x, -30x): 3 adders, 2 adder-steps.
//   dut4  the same coefficients with the built-in sharing search: it must find the same graph.
//   dut5/dut6  {35, 146, 217, 206}: without a limit the search reaches 7 adders in 3 adder-steps;
//         with MAX_STEPS = 2 it needs 8 adders in 2 steps (plain CSD trees need 10 in 2). These
//         counts were worked out with a separate model of the search. This is the delay/area
//         trade-off the adder-step limit gives.
//   dut7  dut1's coefficients with sharing and a limit of 3 steps: the reuse steps bring the
//         9 adders of the plain trees down to 7.
// Every product of every instance is compared with x * c for extreme and random inputs.
`timescale 1ns/1ps
module tb_mult_block;
  import mb_pkg::*;

  localparam int XW = 12;

  // --- instance 1: CSD trees, 12-bit coefficients ---------------------------------------------
  localparam int CW1 = 12;
  localparam int NC1 = 8;
  localparam int C1 [NC1] = '{797, -797, 0, 64, -1, 2047, -2048, 341};
  logic signed [XW-1:0]     x;
  logic signed [XW+CW1-1:0] p1 [NC1];
  mult_block #(.XW(XW), .CW(CW1), .NC(NC1), .COEF(C1), .MAX_STEPS(3), .SHARE(1'b0)) dut1 (.x(x), .prod(p1));
  logic signed [XW+CW1-1:0] p7 [NC1];
  mult_block #(.XW(XW), .CW(CW1), .NC(NC1), .COEF(C1), .MAX_STEPS(3)) dut7 (.x(x), .prod(p7));

  // --- instance 2: defaults -------------------------------------------------------------------
  logic signed [XW+8-1:0] p2 [3];
  mult_block dut2 (.x(x), .prod(p2));

  // --- instance 3: explicit shared graph ------------------------------------------------------
  localparam int CW3 = 8;
  localparam int C3 [4] = '{7, 105, 15, -30};
  //                                   a  b  sa sb na nb
  localparam mb_add_t [2:0] ADDS = '{ '{8'd0, 8'd0, 6'd4, 6'd0, 1'b0, 1'b1},   // n3 = 16x - x
                                      '{8'd1, 8'd1, 6'd4, 6'd0, 1'b0, 1'b1},   // n2 = 16n1 - n1
                                      '{8'd0, 8'd0, 6'd3, 6'd0, 1'b0, 1'b1} }; // n1 = 8x - x
  localparam mb_out_t [3:0] OUTS = '{ '{8'd3, 6'd1, 1'b1, 1'b0},               // -30x = -(n3<<1)
                                      '{8'd3, 6'd0, 1'b0, 1'b0},               // 15x
                                      '{8'd2, 6'd0, 1'b0, 1'b0},               // 105x
                                      '{8'd1, 6'd0, 1'b0, 1'b0} };             // 7x
  logic signed [XW+CW3-1:0] p3 [4];
  mult_block #(.XW(XW), .CW(CW3), .NC(4), .COEF(C3), .MAX_STEPS(2),
               .EXT_NADD(3), .EXT_MAX(3), .EXT_ADDS(ADDS), .EXT_OUTS(OUTS)) dut3 (.x(x), .prod(p3));

  logic signed [XW+CW3-1:0] p4 [4];
  mult_block #(.XW(XW), .CW(CW3), .NC(4), .COEF(C3), .MAX_STEPS(2)) dut4 (.x(x), .prod(p4));

  // --- instances 5 and 6: the adder-step limit trades adders for delay ---------------------------
  localparam int CW5 = 9;
  localparam int C5 [4] = '{35, 146, 217, 206};
  logic signed [XW+CW5-1:0] p5 [4], p6 [4];
  mult_block #(.XW(XW), .CW(CW5), .NC(4), .COEF(C5))                dut5 (.x(x), .prod(p5));
  mult_block #(.XW(XW), .CW(CW5), .NC(4), .COEF(C5), .MAX_STEPS(2)) dut6 (.x(x), .prod(p6));

  int checks = 0, failures = 0;

  function automatic int digits(input int v);   // CSD non-zero digits of |v|
    int n = 0;
    longint t = (v < 0) ? -longint'(v) : longint'(v);
    while (t != 0) begin
      if (t % 2 != 0) begin
        n++;
        if (t % 4 == 3) t = t + 1; else t = t - 1;
      end
      t = t / 2;
    end
    return n;
  endfunction

  function automatic int oddpart(input int v);
    int t = (v < 0) ? -v : v;
    while (t != 0 && t % 2 == 0) t = t / 2;
    return t;
  endfunction

  function automatic int clog2i(input int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);  // got == exp
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    #1;
    for (int j = 0; j < NC1; j++) check($sformatf("p1[%0d] x=%0d", j, x), longint'(p1[j]), longint'(x) * C1[j]);
    check("p2[0]", longint'(p2[0]), longint'(x) * 6);
    check("p2[1]", longint'(p2[1]), longint'(x) * 12);
    check("p2[2]", longint'(p2[2]), longint'(x) * 6);
    for (int j = 0; j < 4; j++) begin
      check($sformatf("p3[%0d] x=%0d", j, x), longint'(p3[j]), longint'(x) * C3[j]);
      check($sformatf("p4[%0d] x=%0d", j, x), longint'(p4[j]), longint'(x) * C3[j]);
      check($sformatf("p5[%0d] x=%0d", j, x), longint'(p5[j]), longint'(x) * C5[j]);
      check($sformatf("p6[%0d] x=%0d", j, x), longint'(p6[j]), longint'(x) * C5[j]);
    end
    for (int j = 0; j < NC1; j++) check($sformatf("p7[%0d] x=%0d", j, x), longint'(p7[j]), longint'(x) * C1[j]);
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_add, exp_steps;
    // Expected adders/depth of instance 1: one tree per distinct non-zero magnitude.
    exp_add = 0; exp_steps = 0;
    for (int j = 0; j < NC1; j++) begin
      bit dup;
      dup = 0;
      for (int i = 0; i < j; i++) if (oddpart(C1[i]) == oddpart(C1[j])) dup = 1;
      if (!dup && C1[j] != 0) begin
        exp_add += digits(C1[j]) - 1;
        if (clog2i(digits(C1[j])) > exp_steps) exp_steps = clog2i(digits(C1[j]));
      end
    end
    check("dut1 adders", dut1.NADD, exp_add);
    check("dut1 adder-steps", dut1.ADDER_STEPS, exp_steps);
    check("dut2 adders", dut2.NADD, 1);
    check("dut2 adder-steps", dut2.ADDER_STEPS, 1);
    check("dut4 adders", dut4.NADD, 3);
    check("dut4 adder-steps", dut4.ADDER_STEPS, 2);
    check("dut5 adders", dut5.NADD, 7);
    check("dut5 adder-steps", dut5.ADDER_STEPS, 3);
    check("dut6 adders", dut6.NADD, 8);
    check("dut6 adder-steps", dut6.ADDER_STEPS, 2);
    check("dut7 adders", dut7.NADD, 7);
    check("dut7 adder-steps", dut7.ADDER_STEPS, 3);
    check("dut3 adders", dut3.NADD, 3);
    check("dut3 adder-steps", dut3.ADDER_STEPS, 2);

    foreach (C1[j]) $display("coef %0d: %0d CSD digits", C1[j], digits(C1[j]));
    $display("dut1: %0d adders, %0d adder-steps", dut1.NADD, dut1.ADDER_STEPS);

    $display("limit none: %0d adders / %0d steps; limit 2: %0d adders / %0d steps",
             dut5.NADD, dut5.ADDER_STEPS, dut6.NADD, dut6.ADDER_STEPS);
    for (int v = -2048; v <= 2047; v += 2047) begin x = XW'(v); check_all(); end
    x = 12'sd1;  check_all();
    x = -12'sd1; check_all();
    x = 12'sd0;  check_all();
    for (int i = 0; i < 2000; i++) begin
      x = XW'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
