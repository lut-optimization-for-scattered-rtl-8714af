// tb_weight_increment: applies random samples, control words, error signs and
// step-size shifts, and checks each weight against
//   w_k +/- floor(x_k / 2^(1+i+t))      (no change for t = L-1)
// kept by the testbench; the bit slice is checked for every bit index, and
// the weights must hold while update is low.
module tb_weight_increment;
  localparam int L = 16, N = 4, TW = 4;
  logic clk = 1'b0, rst, update, sign;
  logic signed [L-1:0] x_in [N];
  logic [TW-1:0] t;
  logic [L-1:0] step_shift;
  logic [$clog2(L)-1:0] bit_idx;
  logic [N-1:0] a_slice;
  logic signed [L-1:0] w [N];
  int checks = 0, failures = 0;
  int wm [N];

  weight_increment #(.L(L), .N(N), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; update = 1'b0; sign = 1'b0; t = '0; step_shift = '0; bit_idx = '0;
    foreach (x_in[k]) x_in[k] = '0;
    foreach (wm[k]) wm[k] = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 1000; r++) begin
      int xv [N];
      int sh;
      update = (r % 4 != 3);
      sign = 1'($urandom);
      t = TW'($urandom);
      step_shift = (r % 3 == 0) ? L'($urandom % 4) : '0;
      if (r % 50 == 7) step_shift = 16'hffff;
      for (int k = 0; k < N; k++) begin
        xv[k] = (r % 10 == 0) ? -32768 : int'($signed(16'($urandom)));
        x_in[k] = L'(xv[k]);
      end
      @(posedge clk); #1;
      if (update && t != TW'(L - 1)) begin
        sh = 1 + int'(step_shift) + int'(t);
        for (int k = 0; k < N; k++) begin
          int inc;
          inc = (sh >= 31) ? ((xv[k] < 0) ? -1 : 0) : (xv[k] >>> sh);
          wm[k] = sign ? wm[k] - inc : wm[k] + inc;
          wm[k] = int'($signed(16'(wm[k])));
        end
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(w[k]) != wm[k]) begin
          failures++;
          $display("FAIL r=%0d w[%0d]=%0d exp %0d", r, k, w[k], wm[k]);
          wm[k] = int'(w[k]);
        end
      end
      if (r % 20 == 0) begin
        update = 1'b0;   // hold the weights while the slices are read
        for (int l = 0; l < L; l++) begin
          bit_idx = 4'(l);
          #1;
          for (int k = 0; k < N; k++) begin
            checks++;
            if (a_slice[k] != bit'((wm[k] >>> l) & 1)) begin failures++; $display("FAIL slice"); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
