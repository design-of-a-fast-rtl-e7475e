// Testbench for serial_half: random 14-bit words enter LSB first with phase 0
// as their LSB cycle; `hold` is high in phase 0. The result word starts in
// phase 1 and must equal the input word shifted right arithmetically by one.
module serial_half_tb;
  localparam int N = 14;
  localparam int FRAMES = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic hold, d, q;
  logic [N-1:0] w [FRAMES];
  logic [N-1:0] got;
  int checks = 0, failures = 0;

  serial_half dut (.clk, .rst_n, .hold, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #(10 * (FRAMES + 10) * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) w[f] = N'($urandom);
    w[0] = {1'b1, {(N-1){1'b0}}};   // most negative: sign must repeat
    w[1] = {1'b0, {(N-1){1'b1}}};   // most positive
    hold = 1'b0; d = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < (FRAMES - 1) * N; t++) begin
      int f, k;
      f = t / N; k = t % N;
      hold = (k == 0);
      d = w[f][k];
      #1;
      // output word starts at offset 1
      if (t >= 1) begin
        int rf, rk;
        rf = (t - 1) / N; rk = (t - 1) % N;
        got[rk] = q;
        if (rk == N - 1) begin
          checks++;
          if (got !== N'($signed(w[rf]) >>> 1)) begin
            failures++;
            $display("frame %0d: %h/2 got %h", rf, w[rf], got);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
