// tb_control_word_gen: t must be (L-2) - floor(log2(mag)) for a non-zero
// magnitude and L-1 for zero; checked for every power of two, all values
// below 2^10 and random values.
module tb_control_word_gen;
  localparam int L = 16, TW = 4;
  logic [L-2:0] mag;
  logic [TW-1:0] t;
  int checks = 0, failures = 0;

  control_word_gen #(.L(L), .TW(TW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_value(input int v);
    int expv;
    mag = (L-1)'(v);
    #1;
    expv = (v == 0) ? L - 1 : (L - 2) - $clog2(v + 1) + 1;
    checks++;
    if (int'(t) != expv) begin
      failures++;
      $display("FAIL mag=%0d t=%0d exp %0d", v, t, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < L - 1; i++) try_value(1 << i);
    for (int v = 0; v < 1024; v++) try_value(v);
    for (int r = 0; r < 500; r++) try_value(int'($urandom % 32768));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
