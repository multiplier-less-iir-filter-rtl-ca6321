// tb_workload_filter2: a sixth-order elliptic low-pass (cutoff 0.1 of Nyquist, 0.1 dB passband
// ripple, 50 dB stopband attenuation) as three cascaded sections with 9-bit coefficients,
// run on iir_cascade under three adder-step limits.
//
// The coefficients come from a standard elliptic design, with the gain spread so that each
// section has unity DC gain, and are quantized with 7 fractional bits. The quantized filter has
// a DC gain of about 0.8 and at least 50 dB attenuation above 0.2 of Nyquist. The same filter is
// instantiated with MAX_STEPS = 2, 3 and 0 (no limit). All three must produce identical,
// bit-exact outputs, checked against the reference model with random samples, an impulse and a
// step. The test also checks:
//   * the total adder count and the worst adder-step depth of each instance's multiplier blocks
//     (18 adders / 2 steps with the limit of 2; 16 adders / 3 steps with a limit of 3 or none),
//     against values worked out with a separate model of the graph search;
//   * a passband tone (0.02 of Nyquist, amplitude 1500) comes out at 1000..1400;
//   * a stopband tone (0.4 of Nyquist, amplitude 1500) comes out below 40. The 50 dB stopband
//     alone would leave about 5; the rest is the noise of flooring each section's output, which
//     the high-Q later sections amplify.
`timescale 1ns/1ps
module tb_workload_filter2;
  import iir_ref_pkg::*;

  localparam int XW = 12, CW = 9, NSEC = 3, FRAC = 7;
  localparam int B [NSEC*3] = '{3, -2, 3,  34, -58, 34,  73, -132, 73};
  localparam int A [NSEC*2] = '{216, -93,  227, -109,  237, -123};
  localparam int LIM [3] = '{2, 3, 0};
  localparam int EXP_ADD [3] = '{18, 16, 16};
  localparam int EXP_STEPS [3] = '{2, 3, 3};

  logic clk = 0, rst = 1, x_valid = 0;
  logic signed [XW-1:0] x_i = '0;
  logic y_valid [3];
  logic signed [XW-1:0] y_o [3];

  for (genvar i = 0; i < 3; i++) begin : g_dut
    iir_cascade #(.XW(XW), .CW(CW), .NSEC(NSEC), .FRAC(FRAC), .B(B), .A(A), .MAX_STEPS(LIM[i])) dut (
      .clk, .rst, .x_valid, .x_i, .y_valid(y_valid[i]), .y_o(y_o[i])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cascade_model m;
  longint expd;
  bit     pending = 0;
  int     peak = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One sample per clock; each output is checked one clock later on all three instances.
  task automatic send(input longint v, input bit track);
    @(negedge clk);
    if (pending) begin
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (!y_valid[i] || longint'(y_o[i]) != expd) begin
          failures++;
          if (failures < 10) $display("FAIL limit %0d: y=%0d expected %0d", LIM[i], y_o[i], expd);
        end
      end
      if (track && ((expd < 0 ? -expd : expd) > longint'(peak))) peak = int'(expd < 0 ? -expd : expd);
    end
    x_valid = 1;
    x_i     = XW'(v);
    expd    = m.step(v);
    pending = 1;
  endtask

  task automatic tone(input real f, output int amp);
    peak = 0;
    for (int n = 0; n < 1200; n++) send(longint'($rtoi(1500.0 * $sin(3.14159265358979 * f * n))), n >= 600);
    amp = peak;
  endtask

  function automatic int nadd(input int i);
    case (i)
      0: return g_dut[0].dut.g_sec[0].g_in.u_mb.NADD + g_dut[0].dut.g_sec[1].g_in.u_mb.NADD +
                g_dut[0].dut.g_sec[2].g_in.u_mb.NADD + g_dut[0].dut.g_last.u_mb.NADD;
      1: return g_dut[1].dut.g_sec[0].g_in.u_mb.NADD + g_dut[1].dut.g_sec[1].g_in.u_mb.NADD +
                g_dut[1].dut.g_sec[2].g_in.u_mb.NADD + g_dut[1].dut.g_last.u_mb.NADD;
      default: return g_dut[2].dut.g_sec[0].g_in.u_mb.NADD + g_dut[2].dut.g_sec[1].g_in.u_mb.NADD +
                g_dut[2].dut.g_sec[2].g_in.u_mb.NADD + g_dut[2].dut.g_last.u_mb.NADD;
    endcase
  endfunction

  function automatic int max4(input int a, input int b, input int c, input int d);
    int r = a;
    if (b > r) r = b;
    if (c > r) r = c;
    if (d > r) r = d;
    return r;
  endfunction

  function automatic int nsteps(input int i);
    case (i)
      0: return max4(g_dut[0].dut.g_sec[0].g_in.u_mb.ADDER_STEPS, g_dut[0].dut.g_sec[1].g_in.u_mb.ADDER_STEPS,
                     g_dut[0].dut.g_sec[2].g_in.u_mb.ADDER_STEPS, g_dut[0].dut.g_last.u_mb.ADDER_STEPS);
      1: return max4(g_dut[1].dut.g_sec[0].g_in.u_mb.ADDER_STEPS, g_dut[1].dut.g_sec[1].g_in.u_mb.ADDER_STEPS,
                     g_dut[1].dut.g_sec[2].g_in.u_mb.ADDER_STEPS, g_dut[1].dut.g_last.u_mb.ADDER_STEPS);
      default: return max4(g_dut[2].dut.g_sec[0].g_in.u_mb.ADDER_STEPS, g_dut[2].dut.g_sec[1].g_in.u_mb.ADDER_STEPS,
                     g_dut[2].dut.g_sec[2].g_in.u_mb.ADDER_STEPS, g_dut[2].dut.g_last.u_mb.ADDER_STEPS);
    endcase
  endfunction

  initial begin
    int pass_amp, stop_amp;
    m = new(NSEC, B, A, FRAC, XW);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      $display("limit %0d: %0d adders, %0d adder-steps", LIM[i], nadd(i), nsteps(i));
      if (nadd(i) != EXP_ADD[i])     begin failures++; $display("FAIL limit %0d: adder count", LIM[i]); end
      if (nsteps(i) != EXP_STEPS[i]) begin failures++; $display("FAIL limit %0d: adder-steps", LIM[i]); end
    end
    send(1500, 0);
    repeat (200) send(0, 0);
    repeat (300) send(1500, 0);
    repeat (1000) send($signed($urandom % 2048) - 1024, 0);
    tone(0.02, pass_amp);
    tone(0.4, stop_amp);
    @(negedge clk);
    x_valid = 0;
    $display("passband tone amplitude %0d, stopband tone amplitude %0d", pass_amp, stop_amp);
    checks += 2;
    if (pass_amp < 1000 || pass_amp > 1400) begin failures++; $display("FAIL passband amplitude"); end
    if (stop_amp >= 40)                     begin failures++; $display("FAIL stopband amplitude"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
