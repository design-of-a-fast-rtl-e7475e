// Specification test of the complete chip with sine inputs.
//
// The receiver samples at fs = 6.4 MHz; the filter must keep the passband
// (0 to 1 MHz) flat within 0.5 dB, attenuate the stopband (from 2.2 MHz up to
// fs/2) by at least 40 dB, and keep the spread of its group delay over the
// passband under 200 ns. For each test frequency the testbench drives the chip
// with a 10-bit sine of amplitude 480, lets it settle, and correlates the
// y_out samples with sine and cosine to get gain and phase. The group delay
// comes from the phase difference between f and f + 50 kHz (one OFDM channel
// spacing). Everything runs through the clock generator, control unit and I/O
// unit, with the chip at its only size.
`timescale 1ns / 1ps
module lwdf6_spec_tb;
  import lwdf_ref_pkg::*;
  localparam real FS = 6.4e6;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 480.0;
  localparam int SETTLE = 120;
  localparam int MEAS = 640;
  localparam int NPB = 5;
  localparam int NSB = 4;
  localparam real DF = 50.0e3;

  logic osc = 1'b0;
  logic rst_n = 1'b1;
  logic trig = 1'b0;
  logic [9:0] x_in = '0;
  logic [9:0] y_out;
  logic y_sat, busy;
  int checks = 0, failures = 0;

  real pb_f [NPB] = '{50.0e3, 250.0e3, 500.0e3, 750.0e3, 950.0e3};
  real sb_f [NSB] = '{2.2e6, 2.6e6, 2.9e6, 3.15e6};

  lwdf6_chip dut (.osc, .rst_n, .trig, .x_in, .y_out, .y_sat, .busy);

  always #5.5 osc = ~osc;

  initial begin
    #(11.0 * 30 * (2 * NPB + NSB) * (SETTLE + MEAS + 2) + 10000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sample through the chip: returns the output of the previous sample
  task automatic run_sample(input int x, output int y_prev);
    x_in = 10'(x);
    @(posedge osc);
    #1 trig = 1'b1;
    @(posedge osc);
    #1 trig = 1'b0;
    wait (busy == 1'b1);
    wait (busy == 1'b0);
    y_prev = sext(int'(y_out), 10);
  endtask

  // gain (linear) and phase (rad) of the chip at frequency f
  task automatic measure(input real f, output real gain, output real phase);
    real si, co, w, ang;
    int x, y;
    si = 0.0; co = 0.0;
    w = 2.0 * PI * f / FS;
    // sample n's output is read after sample n+1's burst
    for (int n = 0; n < SETTLE + MEAS + 1; n++) begin
      x = int'($floor(AMP * $sin(w * n) + 0.5));
      run_sample(x, y);
      if (n - 1 >= SETTLE) begin
        ang = w * (n - 1);
        si += y * $sin(ang);
        co += y * $cos(ang);
      end
    end
    si = 2.0 * si / MEAS;
    co = 2.0 * co / MEAS;
    gain = $sqrt(si * si + co * co) / AMP;
    // y = g*sin(wn + phase) = g*cos(phase) sin(wn) + g*sin(phase) cos(wn)
    phase = $atan2(co, si);
  endtask

  initial begin
    real g, ph, g2, ph2, db, dphi, gd, gd_min, gd_max, rip_min, rip_max;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge osc);
    rst_n = 1'b1;
    repeat (2) @(posedge osc);

    gd_min = 1.0e9; gd_max = -1.0e9;
    rip_min = 1.0e9; rip_max = -1.0e9;
    for (int i = 0; i < NPB; i++) begin
      measure(pb_f[i], g, ph);
      measure(pb_f[i] + DF, g2, ph2);
      db = 20.0 * $log10(g);
      dphi = ph - ph2;
      while (dphi < 0.0) dphi += 2.0 * PI;
      while (dphi >= 2.0 * PI) dphi -= 2.0 * PI;
      gd = dphi / (2.0 * PI * DF) * 1.0e9;
      $display("passband %7.0f Hz: gain %6.3f dB, group delay %5.1f ns", pb_f[i], db, gd);
      if (db < rip_min) rip_min = db;
      if (db > rip_max) rip_max = db;
      if (gd < gd_min) gd_min = gd;
      if (gd > gd_max) gd_max = gd;
      checks++;
      if (db < -0.5 || db > 0.5) begin
        failures++;
        $display("  passband gain out of range");
      end
    end
    $display("passband ripple %5.3f dB, group delay %5.1f to %5.1f ns", rip_max - rip_min, gd_min, gd_max);
    checks += 2;
    if (rip_max - rip_min > 0.5) begin failures++; $display("ripple above 0.5 dB"); end
    if (gd_max - gd_min > 200.0) begin failures++; $display("group delay spread above 200 ns"); end

    for (int i = 0; i < NSB; i++) begin
      measure(sb_f[i], g, ph);
      db = 20.0 * $log10(g + 1.0e-9);
      $display("stopband %7.0f Hz: gain %6.1f dB", sb_f[i], db);
      checks++;
      if (db > -40.0) begin
        failures++;
        $display("  stopband attenuation below 40 dB");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
