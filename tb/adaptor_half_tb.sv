// Testbench for adaptor_half: random 12-bit values, sign-extended to 14-bit
// frames, drive a1 and a2 with their LSB in phase 0. Both outputs start three
// cycles later (phase 3) and are compared with
//   e = (a1 - a2) >>> 1,  b1 = a2 + e,  b2 = a1 + e.
module adaptor_half_tb;
  import lwdf_ref_pkg::*;
  localparam int N = 14;
  localparam int LAT = 3;
  localparam int FRAMES = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] ph;
  logic a1, a2, b1, b2;
  int wa [FRAMES];
  int wb [FRAMES];
  logic [N-1:0] got_b1, got_b2;
  int checks = 0, failures = 0;

  adaptor_half dut (
    .clk, .rst_n, .st0(ph[0]), .st1(ph[1]), .st2(ph[2]),
    .a1, .a2, .b1, .b2
  );

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
      wa[f] = sext($urandom, 12);
      wb[f] = sext($urandom, 12);
    end
    wa[0] = -2048; wb[0] = -2048;
    wa[1] = 2047;  wb[1] = 2047;
    wa[2] = 5;     wb[2] = -6;
    wa[3] = -2048; wb[3] = 2047;
    ph = '0; a1 = 1'b0; a2 = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < (FRAMES - 1) * N; t++) begin
      int f, k;
      logic [N-1:0] va, vb;
      f = t / N; k = t % N;
      va = N'(wa[f]); vb = N'(wb[f]);
      ph = N'(1) << k;
      a1 = va[k]; a2 = vb[k];
      #1;
      if (t >= LAT) begin
        int rf, rk;
        rf = (t - LAT) / N; rk = (t - LAT) % N;
        got_b1[rk] = b1;
        got_b2[rk]  = b2;
        if (rk == N - 1) begin
          int e;
          e = (wa[rf] - wb[rf]) >>> 1;
          checks += 2;
          if (got_b2 !== N'(wa[rf] + e)) begin
            failures++;
            $display("b2 frame %0d: a1=%0d a2=%0d got %0d", rf, wa[rf], wb[rf], sext(int'(got_b2), N));
          end
          if (got_b1 !== N'(wb[rf] + e)) begin
            failures++;
            $display("b1 frame %0d: a1=%0d a2=%0d got %0d", rf, wa[rf], wb[rf], sext(int'(got_b1), N));
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
