// tb_da_table: shifts random samples into the DA table and compares every
// entry k with the sum of the remembered samples x(n-j) for the bits j of k,
// and the taps with the samples themselves.
module tb_da_table;
  localparam int L = 16, N = 4, W = L + 2;
  logic clk = 1'b0, rst, load;
  logic signed [L-1:0] x_in;
  logic signed [W-1:0] entry [2**N];
  logic signed [L-1:0] x_tap [N];
  int checks = 0, failures = 0;
  int hist [N];

  da_table #(.L(L), .N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; x_in = '0;
    foreach (hist[j]) hist[j] = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      load = (n % 3 != 2);   // some cycles without a load: table must hold
      case (n % 5)
        0: x_in = 16'sh8000;
        1: x_in = 16'sh7fff;
        default: x_in = L'($urandom);
      endcase
      @(posedge clk); #1;
      if (load) begin
        for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = int'(x_in);
      end
      for (int k = 0; k < 2**N; k++) begin
        int s;
        s = 0;
        for (int j = 0; j < N; j++) if (k[j]) s += hist[j];
        checks++;
        if (int'(entry[k]) != s) begin
          failures++;
          $display("FAIL n=%0d entry[%0d]=%0d exp %0d", n, k, entry[k], s);
        end
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (int'(x_tap[j]) != hist[j]) begin failures++; $display("FAIL tap %0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
