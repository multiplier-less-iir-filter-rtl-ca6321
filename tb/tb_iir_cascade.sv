// tb_iir_cascade: self-checking test of the cascade filter at its default size (four second-order
// sections, 8-bit coefficients, 12-bit samples).
//
// Stimulus: an impulse followed by silence, a full-scale positive and then negative step, and
// random samples, with random idle cycles (x_valid low) and one reset in the middle. Each output
// must appear exactly one clock after its input and is compared with a chain of direct-form-I second-order reference models (iir_ref_pkg) that
// uses ordinary multiplication. The test also counts: outputs produced by feedback alone (input
// silent for more than N samples yet output non-zero), saturated outputs, idle cycles and resets,
// and fails if any of them never happened.
`timescale 1ns/1ps
module tb_iir_cascade;
  import iir_ref_pkg::*;

  localparam int XW = 12, NSEC = 4, N = 2 * NSEC, FRAC = 6;
  localparam int B [NSEC*3] = '{6, 12, 6,  6, 12, 6,  7, 14, 7,  8, 16, 8};
  localparam int A [NSEC*2] = '{53, -12,  57, -17,  65, -28,  80, -48};

  logic clk = 0, rst = 1, x_valid = 0, y_valid;
  logic signed [XW-1:0] x_i = '0, y_o;

  iir_cascade dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fb = 0, n_idle = 0, n_reset = 0, n_out = 0;
  int silent = 0;
  cascade_model m;
  longint exp_q [$];
  longint cyc_q [$];     // cycle at which each expected output must appear
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker: every y_valid must match the oldest outstanding expectation.
  always @(posedge clk) begin
    if (!rst && y_valid) begin
      longint e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %0d", y_o);
      end else begin
        e = exp_q.pop_front();
        n_out++;
        checks++;
        if (cyc_q.pop_front() != cycle) begin
          failures++;
          $display("FAIL: output %0d not one clock after its input", n_out);
        end
        if (longint'(y_o) != e) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: y=%0d expected %0d", n_out, y_o, e);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input longint v);
    longint e;
    while (($urandom % 4) == 0) begin   // idle cycles
      @(negedge clk);
      x_valid = 0;
      n_idle++;
    end
    @(negedge clk);
    x_valid = 1;
    x_i     = XW'(v);
    e = m.step(v);
    exp_q.push_back(e);
    cyc_q.push_back(cycle + 1);
    silent = (v == 0) ? silent + 1 : 0;
    if (silent > N && e != 0) n_fb++;
  endtask

  task automatic run_stimulus();
    send(1000);
    repeat (60) send(0);
    repeat (80) send(2047);
    repeat (80) send(-2048);
    repeat (500) send($signed($urandom % 4096) - 2048);
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    m = new(NSEC, B, A, FRAC, XW);
    repeat (3) @(negedge clk);
    rst = 0;
    run_stimulus();
    repeat (3) @(negedge clk);
    // mid-run reset: filter state and reference cleared together
    rst = 1; n_reset++;
    @(negedge clk);
    rst = 0;
    m.reset();
    exp_q.delete();
    cyc_q.delete();
    silent = 0;
    run_stimulus();
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    $display("outputs %0d, feedback-only %0d, saturated %0d, idle %0d, resets %0d",
             n_out, n_fb, m.n_sat(), n_idle, n_reset);
    $display("junction multiplier blocks: %0d, %0d, %0d, %0d, %0d adders",
             dut.g_sec[0].g_in.u_mb.NADD, dut.g_sec[1].g_in.u_mb.NADD, dut.g_sec[2].g_in.u_mb.NADD,
             dut.g_sec[3].g_in.u_mb.NADD, dut.g_last.u_mb.NADD);
    checks += 4;
    if (n_fb == 0)    begin failures++; $display("FAIL: feedback never observed"); end
    if (m.n_sat() == 0) begin failures++; $display("FAIL: saturation never happened"); end
    if (n_idle == 0)  begin failures++; $display("FAIL: no idle cycle"); end
    if (n_reset == 0) begin failures++; $display("FAIL: no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
