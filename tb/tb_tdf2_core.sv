// tb_tdf2_core: self-checking test of the transposed direct form II adder/delay column.
//
// An order-3 core is driven with random products, some large enough to push the output into
// saturation, and with random enable gaps and one mid-run reset. A reference model keeps its own
// state registers and computes y = sat((bp0 + s1) >>> FRAC) every cycle. The test counts the
// cycles that saturated high and low and the cycles the enable held the state, and fails if any of
// them never happened.
`timescale 1ns/1ps
module tb_tdf2_core;
  localparam int N = 3, PW = 20, GW = 4, FRAC = 6, YW = 12;
  localparam int SW = PW + GW;

  logic clk = 0, rst = 1, en = 0;
  logic signed [PW-1:0] bp [N+1];
  logic signed [PW-1:0] ap [N+1];
  logic signed [YW-1:0] y;

  tdf2_core #(.N(N), .PW(PW), .GW(GW), .FRAC(FRAC), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_hold = 0;
  longint ms [1:N+1];   // model state

  function automatic longint model_y();
    longint a = longint'(bp[0]) + ms[1];
    a = a >>> FRAC;
    if (a > (1 <<< (YW - 1)) - 1) a = (1 <<< (YW - 1)) - 1;
    if (a < -(1 <<< (YW - 1)))    a = -(1 <<< (YW - 1));
    return a;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= N + 1; k++) if (k >= 1) ms[k] = 0;
    foreach (bp[k]) bp[k] = '0;
    foreach (ap[k]) ap[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      longint ey;
      bit big;
      big = ($urandom % 8) == 0;
      for (int k = 0; k <= N; k++) begin
        bp[k] = big ? PW'($urandom) : PW'($signed($urandom % 8192) - 4096);
        ap[k] = PW'($signed($urandom % 8192) - 4096);
      end
      en  = ($urandom % 4) != 0;
      rst = (cyc == 2000);
      #1;
      ey = model_y();
      checks++;
      if (longint'(y) != ey) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: y=%0d expected %0d", cyc, y, ey);
      end
      if (ey == (1 <<< (YW - 1)) - 1) n_sat_hi++;
      if (ey == -(1 <<< (YW - 1)))    n_sat_lo++;
      if (!en && !rst) n_hold++;
      @(posedge clk);
      // model update at the same edge
      if (rst) for (int k = 1; k <= N; k++) ms[k] = 0;
      else if (en) for (int k = 1; k <= N; k++)
        ms[k] = longint'(bp[k]) + longint'(ap[k]) + ((k == N) ? 0 : ms[k+1]);
      #1;
    end
    $display("saturated high %0d, low %0d, held %0d", n_sat_hi, n_sat_lo, n_hold);
    checks += 3;
    if (n_sat_hi == 0) failures++;
    if (n_sat_lo == 0) failures++;
    if (n_hold == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
