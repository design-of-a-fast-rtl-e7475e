// Testbench for control_ring: after reset the single 1 must be in position 0,
// and after every clock it must have moved one position on, wrapping after
// N = 14 clocks (one turn per sample).
module control_ring_tb;
  localparam int N = 14;
  localparam int CYC = 10 * N + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] ph;
  int checks = 0, failures = 0;
  int turns = 0;

  control_ring #(.N(N)) dut (.clk, .rst_n, .ph);

  always #5 clk = ~clk;

  initial begin
    #(10 * (CYC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (ph !== N'(1)) begin failures++; $display("reset value %b", ph); end
    rst_n = 1'b1;
    for (int t = 0; t < CYC; t++) begin
      checks++;
      if (ph !== (N'(1) << (t % N))) begin
        failures++;
        $display("cycle %0d: %b", t, ph);
      end
      if (t % N == N - 1) turns++;
      @(negedge clk);
    end
    checks++;
    if (turns != CYC / N) begin failures++; $display("turns %0d", turns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
