// Testbench for lwdf3_link: two links, one with its frame at phase 0 and one
// at phase 7, filter the same random 10-bit input sequence (sign-extended to
// 14-bit frames). Each output word, five cycles after its input word, is
// compared with the integer reference model of the link. The input also holds
// full-scale steps and a full-scale tone at a quarter of the sample rate, where
// the feedback loop resonates; the testbench checks that this drives the loop
// value beyond the 10-bit range into the guard bits, so the full internal word
// width is exercised.
module lwdf3_link_tb;
  import lwdf_ref_pkg::*;
  localparam int N = 14;
  localparam int LAT = 5;
  localparam int OFF2 = 7;
  localparam int FRAMES = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] ph;
  logic x, y0, y7;
  int xs [FRAMES];
  int ys [FRAMES];
  logic [N-1:0] got0, got7;
  int checks = 0, failures = 0;
  link_state_t st;
  int loop_max = 0;
  logic x7;
  logic [OFF2-1:0] xdel;

  lwdf3_link #(.N(N), .OFF(0))    dut0 (.clk, .rst_n, .ph, .x(x), .y(y0));
  lwdf3_link #(.N(N), .OFF(OFF2)) dut7 (.clk, .rst_n, .ph, .x(x7), .y(y7));

  // the second link sees the same words, OFF2 cycles later
  always_ff @(posedge clk) xdel <= {xdel[OFF2-2:0], x};
  assign x7 = xdel[OFF2-1];

  always #5 clk = ~clk;

  initial begin
    #(10 * (FRAMES + 10) * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = link_reset();
    for (int f = 0; f < FRAMES; f++) begin
      if (f < 40)       xs[f] = (f < 20) ? 511 : -512;
      else if (f < 100) xs[f] = (f % 4 < 2) ? 511 : -512;
      else              xs[f] = sext($urandom, 10);
      ys[f] = link_step(st, xs[f]);
      if (st.b2_1 > loop_max)  loop_max = st.b2_1;
      if (-st.b2_1 > loop_max) loop_max = -st.b2_1;
    end
    ph = '0; x = 1'b0; xdel = '0;
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
        got0[rk] = y0;
        if (rk == N - 1) begin
          checks++;
          if (got0 !== N'(ys[rf])) begin
            failures++;
            $display("OFF=0 frame %0d: want %0d got %0d", rf, ys[rf], sext(int'(got0), N));
          end
        end
      end
      if (t >= LAT + OFF2) begin
        int rf, rk;
        rf = (t - LAT - OFF2) / N; rk = (t - LAT - OFF2) % N;
        got7[rk] = y7;
        if (rk == N - 1) begin
          checks++;
          if (got7 !== N'(ys[rf])) begin
            failures++;
            $display("OFF=7 frame %0d: want %0d got %0d", rf, ys[rf], sext(int'(got7), N));
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (loop_max <= 1023) begin
      failures++;
      $display("loop never left the 10-bit range: %0d", loop_max);
    end
    $display("largest loop value %0d", loop_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
