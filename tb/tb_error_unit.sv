// tb_error_unit: drives random sum/carry words and desired samples and checks
// the final adder (y = S + 2C + 1), the error against the desired sample of
// the previous sample-clock edge, and the registered mu*e = floor(e / 4).
module tb_error_unit;
  localparam int L = 16, G = 2, W = L + G;
  logic clk = 1'b0, rst, tick;
  logic [W-1:0] s_in, c_in;
  logic signed [L-1:0] d_in, mu_e;
  logic signed [W-1:0] y, e;
  int checks = 0, failures = 0;

  error_unit #(.L(L), .G(G), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(input int v, input int bits);
    int m = 1 << bits;
    v = v % m;
    if (v < 0) v += m;
    if (v >= m / 2) v -= m;
    return v;
  endfunction

  initial begin
    int d_q = 0, mu_q = 0;
    rst = 1'b1; tick = 1'b0; s_in = '0; c_in = '0; d_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 2000; r++) begin
      int sv, cv, yv, ev;
      tick = (r % 3 != 1);
      s_in = W'($urandom);
      c_in = W'($urandom);
      d_in = L'($urandom);
      if (r % 7 == 0) begin s_in = W'(100 * (r % 13)); c_in = '0; end
      #1;
      sv = int'($signed(s_in));
      cv = int'($signed(c_in));
      yv = wrap(sv + 2 * cv + 1, W);
      ev = wrap(d_q - yv, W);
      checks += 2;
      if (int'(y) != yv) begin failures++; $display("FAIL y %0d exp %0d", y, yv); end
      if (int'(e) != ev) begin failures++; $display("FAIL e %0d exp %0d", e, ev); end
      @(posedge clk); #1;
      if (tick) begin
        mu_q = ev >>> G;
        d_q = int'(d_in);
      end
      checks++;
      if (int'(mu_e) != mu_q) begin failures++; $display("FAIL mu_e %0d exp %0d", mu_e, mu_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
