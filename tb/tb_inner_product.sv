// tb_inner_product: runs the four-point DA inner-product block over many
// sample periods with random weights and samples (extremes included). After
// each sample-clock edge the output words must give
//   S + 2*C + 1 = floor( sum_k w_k * x(n-k) / 2^(L-1) ),
// computed directly from the weights and the samples the testbench loaded.
// The bit counter is kept by the testbench; a result must appear exactly one
// sample period (L clocks) after its samples are in the table.
module tb_inner_product;
  localparam int L = 16, N = 4, W = L + 2;
  logic clk = 1'b0, rst, en, first, last, tick;
  logic signed [L-1:0] x_in;
  logic [N-1:0] a_slice;
  logic [W-1:0] s_out, c_out;
  logic signed [L-1:0] x_tap [N];
  int checks = 0, failures = 0;
  int xh [N];
  int wv [N];
  int bitc;

  inner_product #(.L(L), .N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(input int r);
    case (r % 6)
      0: return -32768;
      1: return 32767;
      default: return int'($signed(16'($urandom)));
    endcase
  endfunction

  initial begin
    longint prod, expv;
    logic [W-1:0] got;
    int cycles;
    rst = 1'b1; en = 1'b1; x_in = '0; a_slice = '0;
    first = 1'b0; last = 1'b0; tick = 1'b0;
    foreach (xh[k]) xh[k] = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    // fill the table with N samples first
    for (int p = 0; p < 300; p++) begin
      foreach (wv[k]) wv[k] = pick(p + k);
      cycles = 0;
      for (bitc = 0; bitc < L; bitc++) begin
        first = (bitc == 0);
        last = (bitc == L - 1);
        tick = last;
        for (int k = 0; k < N; k++) a_slice[k] = wv[k][bitc];
        if (last) x_in = L'(pick(p * 7 + 3));
        @(posedge clk); #1;
        cycles++;
      end
      checks++;
      if (cycles != L) begin failures++; $display("FAIL period length %0d", cycles); end
      prod = 0;
      for (int k = 0; k < N; k++) prod += longint'(wv[k]) * longint'(xh[k]);
      expv = prod >>> (L - 1);
      got = s_out + {c_out[W-2:0], 1'b0} + W'(1);
      checks++;
      if (got != W'(expv)) begin
        failures++;
        $display("FAIL period %0d got %0d exp %0d", p, $signed(got), expv);
      end
      for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = int'(x_in);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(x_tap[k]) != xh[k]) begin failures++; $display("FAIL tap %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
