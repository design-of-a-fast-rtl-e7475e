// Testbench for serial_adder: an adder and a subtractor instance receive
// back-to-back random 14-bit words, LSB first, with `start` on the LSB cycle.
// The registered result word starts one cycle later; each result word is
// collected bit by bit and compared with a+b and a-b modulo 2^14.
module serial_adder_tb;
  localparam int N = 14;
  localparam int FRAMES = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start, a, b, s_add, s_sub;
  int checks = 0, failures = 0;

  logic [N-1:0] wa [FRAMES];
  logic [N-1:0] wb [FRAMES];
  logic [N-1:0] got_add, got_sub;

  serial_adder #(.SUB(1'b0)) dut_add (.clk, .rst_n, .start, .a, .b, .s(s_add));
  serial_adder #(.SUB(1'b1)) dut_sub (.clk, .rst_n, .start, .a, .b, .s(s_sub));

  always #5 clk = ~clk;

  initial begin
    #(10 * (FRAMES + 10) * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      wa[f] = N'($urandom);
      wb[f] = N'($urandom);
    end
    wa[0] = '1; wb[0] = N'(1);          // carry through the whole word
    wa[1] = N'(5); wb[1] = N'(9);       // borrow in the subtractor
    start = 1'b0; a = 1'b0; b = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < FRAMES * N + 1; t++) begin
      int f, k;
      f = t / N; k = t % N;
      @(negedge clk);
      if (f < FRAMES) begin
        start = (k == 0);
        a = wa[f][k];
        b = wb[f][k];
      end else begin
        start = 1'b0; a = 1'b0; b = 1'b0;
      end
      // result bits of cycle t-1 are visible now
      if (t >= 1) begin
        int ro, rf, rk;
        ro = t - 1; rf = ro / N; rk = ro % N;
        got_add[rk] = s_add;
        got_sub[rk] = s_sub;
        if (rk == N - 1) begin
          checks += 2;
          if (got_add !== N'(wa[rf] + wb[rf])) begin
            failures++;
            $display("add frame %0d: %h + %h got %h", rf, wa[rf], wb[rf], got_add);
          end
          if (got_sub !== N'(wa[rf] - wb[rf])) begin
            failures++;
            $display("sub frame %0d: %h - %h got %h", rf, wa[rf], wb[rf], got_sub);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
