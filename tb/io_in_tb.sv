// Testbench for io_in: a new random 10-bit word is applied before each load
// cycle (phase 0); the serial output over the following 14 cycles must be the
// word sign-extended to 14 bits, LSB first. x_in changes right after the load
// cycle to show that the word is captured there.
module io_in_tb;
  import lwdf_ref_pkg::*;
  localparam int N = 14;
  localparam int FRAMES = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load;
  logic [9:0] x_in;
  logic sdo;
  logic [N-1:0] got;
  int checks = 0, failures = 0;

  io_in #(.N(N), .XW(10)) dut (.clk, .rst_n, .load, .x_in, .sdo);

  always #5 clk = ~clk;

  initial begin
    #(10 * (FRAMES + 10) * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    load = 1'b0; x_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      w = (f == 0) ? -512 : (f == 1) ? 511 : sext($urandom, 10);
      for (int k = 0; k < N; k++) begin
        load = (k == 0);
        x_in = (k == 0) ? 10'(w) : 10'($urandom);
        #1;
        got[k] = sdo;
        @(negedge clk);
      end
      checks++;
      if (got !== N'(w)) begin
        failures++;
        $display("frame %0d: want %0d got %0d", f, w, sext(int'(got), N));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
