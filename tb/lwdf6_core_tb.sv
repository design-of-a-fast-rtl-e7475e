// Testbench for lwdf6_core: 10-bit samples in 14-bit frames enter with their
// LSB in phase 0; every output word, ten cycles later, is compared with two
// cascaded reference links. Three input segments exercise what a low-pass
// filter of this kind must do:
//   a constant (DC) input, whose output must settle to the input (gain 1),
//   an alternating +A/-A input at half the sample rate, where the response
//   has a zero, whose output must settle to (almost) nothing,
//   random samples, compared word by word.
module lwdf6_core_tb;
  import lwdf_ref_pkg::*;
  localparam int N = 14;
  localparam int LAT = 10;
  localparam int SEG = 60;
  localparam int FRAMES = 3 * SEG + 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] ph;
  logic x, y;
  int xs [FRAMES];
  int ys [FRAMES];
  int got_v [FRAMES];
  logic [N-1:0] got;
  int checks = 0, failures = 0;
  link_state_t st1, st2;

  lwdf6_core #(.N(N)) dut (.clk, .rst_n, .ph, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #(10 * (FRAMES + 10) * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st1 = link_reset();
    st2 = link_reset();
    for (int f = 0; f < FRAMES; f++) begin
      if (f < SEG)          xs[f] = 300;
      else if (f < 2 * SEG) xs[f] = (f % 2) ? 400 : -400;
      else if (f < 3 * SEG) xs[f] = -512;
      else                  xs[f] = sext($urandom, 10);
      ys[f] = link_step(st2, link_step(st1, xs[f]));
    end
    ph = '0; x = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < (FRAMES - 1) * N; t++) begin
      int f, k;
      logic [N-1:0] vx;
      f = t / N; k = t % N;
      vx = N'(xs[f]);
      ph = N'(1) << k;
      x = vx[k];
      #1;
      if (t >= LAT) begin
        int rf, rk;
        rf = (t - LAT) / N; rk = (t - LAT) % N;
        got[rk] = y;
        if (rk == N - 1) begin
          got_v[rf] = sext(int'(got), N);
          checks++;
          if (got !== N'(ys[rf])) begin
            failures++;
            $display("frame %0d: x=%0d want %0d got %0d", rf, xs[rf], ys[rf], got_v[rf]);
          end
        end
      end
      @(negedge clk);
    end
    // settled DC gain: within truncation error of the input
    checks++;
    if (got_v[SEG - 1] < 300 - 4 || got_v[SEG - 1] > 300) begin
      failures++;
      $display("DC: input 300, output %0d", got_v[SEG - 1]);
    end
    // half the sample rate is in the stopband (a zero of the response)
    checks++;
    if (got_v[2 * SEG - 1] < -4 || got_v[2 * SEG - 1] > 4 ||
        got_v[2 * SEG - 2] < -4 || got_v[2 * SEG - 2] > 4) begin
      failures++;
      $display("fs/2: amplitude 400, output %0d %0d", got_v[2 * SEG - 2], got_v[2 * SEG - 1]);
    end
    checks++;
    if (got_v[3 * SEG - 1] < -512 - 4 || got_v[3 * SEG - 1] > -512 + 4) begin
      failures++;
      $display("DC: input -512, output %0d", got_v[3 * SEG - 1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
