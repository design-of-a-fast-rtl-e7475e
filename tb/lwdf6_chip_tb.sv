// End-to-end testbench for lwdf6_chip at its only (default) size.
//
// A free-running oscillator (about 90 MHz: 11 ns period) feeds the chip. For
// every sample the testbench applies x_in, pulses trig and waits for the clock
// burst to end, with idle gaps of varying length between bursts. It checks:
//   - every burst has exactly 14 clock cycles (the sample rate in clocks),
//   - y_out of sample n appears at the 10th clock of burst n+1 and not
//     before, and equals the two-link integer reference limited to 10 bits,
//   - y_sat flags exactly the limited samples,
//   - the settled DC gain is one and half the sample rate is rejected.
// The stimulus is full-scale steps (which overshoot and so exercise the output
// limiter), a DC level, a tone at half the sample rate and random samples. It
// counts how often each mechanism occurred (bursts, idle gaps, limited outputs,
// rejected tone) and fails if one never did.
`timescale 1ns / 1ps
module lwdf6_chip_tb;
  import lwdf_ref_pkg::*;
  localparam int N = 14;
  localparam int SAMPLES = 400;

  logic osc = 1'b0;
  logic rst_n = 1'b1;
  logic trig = 1'b0;
  logic [9:0] x_in = '0;
  logic [9:0] y_out;
  logic y_sat, busy;

  int xs [SAMPLES];
  int ys [SAMPLES];
  int checks = 0, failures = 0;
  int n_bursts = 0, n_gaps = 0, n_sat = 0, n_unsat = 0, n_dc = 0, n_stop = 0;
  int clk_count;
  link_state_t st1, st2;

  lwdf6_chip dut (.osc, .rst_n, .trig, .x_in, .y_out, .y_sat, .busy);

  always #5.5 osc = ~osc;

  // count the bit clocks of the current burst and watch the output timing
  int cur_sample = -1;
  logic [9:0] y_before;
  always @(posedge dut.clk) begin
    clk_count++;
    if (clk_count == 9) y_before = y_out;
  end

  function automatic int limit10(int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction

  initial begin
    #(11 * SAMPLES * (N + 30) + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st1 = link_reset();
    st2 = link_reset();
    for (int n = 0; n < SAMPLES; n++) begin
      if (n < 30)       xs[n] = 511;
      else if (n < 60)  xs[n] = -512;
      else if (n < 70)  xs[n] = 511;
      else if (n < 130) xs[n] = 200;
      else if (n < 190) xs[n] = (n % 2) ? 450 : -450;
      else              xs[n] = sext($urandom, 10);
      ys[n] = link_step(st2, link_step(st1, xs[n]));
    end

    // the bit clock is stopped during reset, so the reset needs an edge
    #1 rst_n = 1'b0;
    repeat (3) @(posedge osc);
    rst_n = 1'b1;
    repeat (3) @(posedge osc);

    for (int n = 0; n < SAMPLES; n++) begin
      int gap;
      gap = $urandom_range(0, 5);
      if (gap > 0) n_gaps++;
      repeat (gap) @(posedge osc);
      x_in = 10'(xs[n]);
      clk_count = 0;
      @(posedge osc);
      #1 trig = 1'b1;
      @(posedge osc);
      #1 trig = 1'b0;
      wait (busy == 1'b1);
      wait (busy == 1'b0);
      @(posedge osc);
      x_in = 10'($urandom);   // input only needs to hold until the first clock
      n_bursts++;
      checks++;
      if (clk_count != N) begin
        failures++;
        $display("sample %0d: burst of %0d clocks", n, clk_count);
      end
      if (n >= 1) begin
        int want, prev;
        want = limit10(ys[n - 1]);
        prev = (n >= 2) ? limit10(ys[n - 2]) : 0;
        checks += 3;
        if (y_out !== 10'(want)) begin
          failures++;
          $display("sample %0d: want %0d got %0d", n - 1, want, sext(int'(y_out), 10));
        end
        if (y_before !== 10'(prev)) begin
          failures++;
          $display("sample %0d: output changed before the 10th clock", n - 1);
        end
        if (y_sat !== (want != ys[n - 1])) begin
          failures++;
          $display("sample %0d: y_sat %0d for %0d", n - 1, y_sat, ys[n - 1]);
        end
        if (y_sat) n_sat++; else n_unsat++;
        // settled DC level
        if (n - 1 == 129) begin
          checks++;
          n_dc++;
          if (want < 200 - 4 || want > 200) begin
            failures++;
            $display("DC gain: input 200 output %0d", want);
          end
        end
        // tone at half the sample rate, settled
        if (n - 1 >= 185 && n - 1 < 190) begin
          checks++;
          if (want < -4 || want > 4) begin
            failures++;
            $display("fs/2 tone: output %0d", want);
          end else n_stop++;
        end
      end
    end
    $display("bursts=%0d gaps=%0d limited=%0d unlimited=%0d dc=%0d stopband=%0d",
             n_bursts, n_gaps, n_sat, n_unsat, n_dc, n_stop);
    checks++;
    if (n_bursts == 0 || n_gaps == 0 || n_sat == 0 || n_unsat == 0 || n_dc == 0 || n_stop == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
