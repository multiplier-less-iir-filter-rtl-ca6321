// tb_iir_top: end-to-end test of both filters at the default parameters of the top.
//
// Both filters run at once on independent sample streams: an impulse and silence, full-scale
// steps of both signs and random samples, each stream with its own random idle cycles, then a
// shared reset and a second pass. Every output must appear one clock after its input and equal the
// reference model (iir_ref_pkg). The test counts, per filter, the outputs, the outputs produced by
// feedback alone, the saturated outputs and the idle cycles, and the resets; a mechanism that never
// happened counts as a failure. It also checks the adder count and adder-step depth of every
// multiplier block against precomputed values and against the default limit of 3 adder-steps.
`timescale 1ns/1ps
module tb_iir_top;
  import iir_ref_pkg::*;

  localparam int XW = 12;
  localparam int N_DF = 6, FRAC_DF = 8;
  localparam int B_DF [N_DF+1] = '{8, 45, 114, 151, 114, 45, 8};
  localparam int A_DF [N_DF]   = '{0, -199, 0, -29, 0, 0};
  localparam int NSEC = 4, FRAC_CAS = 6;
  localparam int B_CAS [NSEC*3] = '{6, 12, 6,  6, 12, 6,  7, 14, 7,  8, 16, 8};
  localparam int A_CAS [NSEC*2] = '{53, -12,  57, -17,  65, -28,  80, -48};
  localparam int NSAMP = 700;

  logic clk = 0, rst = 1;
  logic df_x_valid = 0, df_y_valid, cas_x_valid = 0, cas_y_valid;
  logic signed [XW-1:0] df_x = '0, df_y, cas_x = '0, cas_y;

  iir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_reset = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Per-filter bookkeeping, index 0 = direct form II, 1 = cascade.
  longint exp_q [2][$];
  longint cyc_q [2][$];
  int n_out [2], n_fb [2], n_idle [2], silent [2];
  df_model      mdf;
  cascade_model mcas;

  task automatic check_out(input int f, input logic v, input logic signed [XW-1:0] y);
    if (!rst && v) begin
      checks++;
      if (exp_q[f].size() == 0) begin
        failures++;
        $display("FAIL filter %0d: unexpected output", f);
      end else begin
        longint e = exp_q[f].pop_front();
        longint c = cyc_q[f].pop_front();
        n_out[f]++;
        if (longint'(y) != e || c != cycle) begin
          failures++;
          if (failures < 10) $display("FAIL filter %0d out %0d: y=%0d exp %0d (cycle %0d, due %0d)",
                                      f, n_out[f], y, e, cycle, c);
        end
      end
    end
  endtask

  always @(posedge clk) begin
    check_out(0, df_y_valid, df_y);
    check_out(1, cas_y_valid, cas_y);
  end

  function automatic longint stim(input int i);
    if (i == 0)   return 1000;
    if (i < 60)   return 0;
    if (i < 140)  return 2047;
    if (i < 220)  return -2048;
    return $signed($urandom % 4096) - 2048;
  endfunction

  // Expected size of every multiplier block under the default limit of 3 adder-steps, worked out
  // with a separate model of the graph search.
  task automatic check_mb(input string name, input int nadd, input int steps,
                          input int exp_nadd, input int exp_steps);
    checks += 3;
    $display("%s: %0d adders, %0d adder-steps", name, nadd, steps);
    if (nadd != exp_nadd)   begin failures++; $display("FAIL %s: expected %0d adders", name, exp_nadd); end
    if (steps != exp_steps) begin failures++; $display("FAIL %s: expected %0d steps", name, exp_steps); end
    if (steps > 3)          begin failures++; $display("FAIL %s: over the step limit", name); end
  endtask

  task automatic run_pass();
    int idx [2] = '{0, 0};
    while (idx[0] < NSAMP || idx[1] < NSAMP) begin
      @(negedge clk);
      // direct form II stream
      if (idx[0] < NSAMP && ($urandom % 4) != 0) begin
        longint v = stim(idx[0]);
        longint e = mdf.step(v);
        df_x_valid = 1; df_x = XW'(v);
        exp_q[0].push_back(e); cyc_q[0].push_back(cycle + 1);
        silent[0] = (v == 0) ? silent[0] + 1 : 0;
        if (silent[0] > N_DF && e != 0) n_fb[0]++;
        idx[0]++;
      end else begin
        df_x_valid = 0;
        if (idx[0] < NSAMP) n_idle[0]++;
      end
      // cascade stream
      if (idx[1] < NSAMP && ($urandom % 3) != 0) begin
        longint v = stim(idx[1]);
        longint e = mcas.step(v);
        cas_x_valid = 1; cas_x = XW'(v);
        exp_q[1].push_back(e); cyc_q[1].push_back(cycle + 1);
        silent[1] = (v == 0) ? silent[1] + 1 : 0;
        if (silent[1] > 2 * NSEC && e != 0) n_fb[1]++;
        idx[1]++;
      end else begin
        cas_x_valid = 0;
        if (idx[1] < NSAMP) n_idle[1]++;
      end
    end
    @(negedge clk);
    df_x_valid = 0; cas_x_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdf  = new(N_DF, B_DF, A_DF, FRAC_DF, XW);
    mcas = new(NSEC, B_CAS, A_CAS, FRAC_CAS, XW);
    for (int f = 0; f < 2; f++) begin n_out[f] = 0; n_fb[f] = 0; n_idle[f] = 0; silent[f] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    run_pass();
    rst = 1; n_reset++;
    @(negedge clk);
    rst = 0;
    mdf.reset(); mcas.reset();
    silent = '{0, 0};
    run_pass();

    for (int f = 0; f < 2; f++) begin
      checks++;
      if (exp_q[f].size() != 0) begin failures++; $display("FAIL filter %0d: outputs missing", f); end
    end
    check_mb("df2t b block", dut.u_df2t.u_mb_b.NADD, dut.u_df2t.u_mb_b.ADDER_STEPS, 6, 3);
    check_mb("df2t a block", dut.u_df2t.u_mb_a.NADD, dut.u_df2t.u_mb_a.ADDER_STEPS, 4, 2);
    check_mb("cascade junction 0", dut.u_cascade.g_sec[0].g_in.u_mb.NADD,
             dut.u_cascade.g_sec[0].g_in.u_mb.ADDER_STEPS, 1, 1);
    check_mb("cascade junction 1", dut.u_cascade.g_sec[1].g_in.u_mb.NADD,
             dut.u_cascade.g_sec[1].g_in.u_mb.ADDER_STEPS, 3, 2);
    check_mb("cascade junction 2", dut.u_cascade.g_sec[2].g_in.u_mb.NADD,
             dut.u_cascade.g_sec[2].g_in.u_mb.ADDER_STEPS, 3, 2);
    check_mb("cascade junction 3", dut.u_cascade.g_sec[3].g_in.u_mb.NADD,
             dut.u_cascade.g_sec[3].g_in.u_mb.ADDER_STEPS, 2, 1);
    check_mb("cascade junction 4", dut.u_cascade.g_last.u_mb.NADD,
             dut.u_cascade.g_last.u_mb.ADDER_STEPS, 2, 1);
    $display("df2t:    outputs %0d, feedback-only %0d, saturated %0d, idle %0d",
             n_out[0], n_fb[0], mdf.n_sat, n_idle[0]);
    $display("cascade: outputs %0d, feedback-only %0d, saturated %0d, idle %0d",
             n_out[1], n_fb[1], mcas.n_sat(), n_idle[1]);
    $display("resets %0d", n_reset);
    for (int f = 0; f < 2; f++) begin
      checks += 3;
      if (n_out[f] != 2 * NSAMP) begin failures++; $display("FAIL filter %0d: output count", f); end
      if (n_fb[f] == 0)   begin failures++; $display("FAIL filter %0d: no feedback-only output", f); end
      if (n_idle[f] == 0) begin failures++; $display("FAIL filter %0d: no idle cycle", f); end
    end
    checks += 3;
    if (mdf.n_sat == 0)    begin failures++; $display("FAIL df2t: no saturation"); end
    if (mcas.n_sat() == 0) begin failures++; $display("FAIL cascade: no saturation"); end
    if (n_reset == 0)      begin failures++; $display("FAIL: no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
