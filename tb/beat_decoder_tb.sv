// beat_decoder_tb: self-checking test of the beat decoder.
//
// For every legal ring state (k stages on, k = 0 .. BEATS-1) the expected
// output is one-hot: beat k for k > 0 and the last beat for k = 0. This is
// worked out from the count of ones, not from the gate equations. Every other
// input pattern of the four-beat decoder is checked against the printed
// equations T1o = C1&~C2, T2o = C2&~C3, T3o = C3, T4o = ~C1. A six-beat decoder
// is checked on its legal states too.
`timescale 1ns/1ps
module beat_decoder_tb;

  logic [2:0] c4;
  logic [3:0] t4;
  logic [4:0] c6;
  logic [5:0] t6;

  int checks = 0;
  int failures = 0;

  beat_decoder u4 (.c(c4), .t_pot(t4));
  beat_decoder #(.BEATS(6)) u6 (.c(c6), .t_pot(t6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [3:0] exp4;

  initial begin
    // Legal states, four beats.
    for (int k = 0; k < 4; k++) begin
      c4 = 3'((1 << k) - 1);
      #10;
      expect_eq($sformatf("4-beat state %0d", k), int'(t4), (k == 0) ? 8 : (1 << (k - 1)));
    end
    // All eight patterns against the printed equations.
    for (int v = 0; v < 8; v++) begin
      c4 = 3'(v);
      #10;
      exp4[0] = c4[0] && !c4[1];
      exp4[1] = c4[1] && !c4[2];
      exp4[2] = c4[2];
      exp4[3] = !c4[0];
      expect_eq($sformatf("4-beat pattern %0d", v), int'(t4), int'(exp4));
    end
    // Legal states, six beats.
    for (int k = 0; k < 6; k++) begin
      c6 = 5'((1 << k) - 1);
      #10;
      expect_eq($sformatf("6-beat state %0d", k), int'(t6), (k == 0) ? 32 : (1 << (k - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
