// Testbench for clock_gen: a free-running oscillator and trigger pulses at
// irregular spacing. Each trigger must yield exactly 14 clock pulses, each as
// wide as the oscillator's high phase, and the clock must stay low between
// bursts. A second trigger sent during a burst must not lengthen it.
module clock_gen_tb;
  localparam int NC = 14;
  localparam int BURSTS = 30;
  localparam int HALF = 5;

  logic osc = 1'b0;
  logic rst_n = 1'b0;
  logic trig = 1'b0;
  logic clk, busy;
  int checks = 0, failures = 0;
  int pulses = 0;
  time rise_t = 0;
  bit  seen_rise = 1'b0;

  clock_gen #(.N_CYCLES(NC)) dut (.osc, .rst_n, .trig, .clk, .busy);

  always #HALF osc = ~osc;

  always @(posedge clk) begin
    pulses++;
    rise_t = $time;
    seen_rise = rst_n;
  end
  // the clock may be high before reset has reached the gating flip-flop
  always @(negedge clk) if (seen_rise) begin
    checks++;
    if ($time - rise_t != time'(HALF)) begin
      failures++;
      $display("pulse width %0t", $time - rise_t);
    end
  end

  initial begin
    #(2 * HALF * (BURSTS * (NC + 20) + 50));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge osc);
    rst_n = 1'b1;
    for (int b = 0; b < BURSTS; b++) begin
      repeat (2 + $urandom_range(0, 6)) @(posedge osc);
      #2;
      pulses = 0;
      trig = 1'b1;
      repeat (2) @(posedge osc);
      trig = 1'b0;
      if (b % 5 == 4) begin
        // a retrigger in the middle of the burst
        repeat (4) @(posedge osc);
        #2 trig = 1'b1;
        repeat (2) @(posedge osc);
        trig = 1'b0;
      end
      wait (busy == 1'b0);
      repeat (6) @(posedge osc);
      checks++;
      if (pulses != NC || clk !== 1'b0) begin
        failures++;
        $display("burst %0d: %0d pulses", b, pulses);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
