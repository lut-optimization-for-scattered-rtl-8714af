// tb_csa_accumulator: feeds L random partial products per accumulation, the
// last with sign control, and checks that the finished words satisfy
//   S + 2*C + 1 = floor( (sum_{l<L-1} 2^l P_l - 2^(L-1) P_(L-1)) / 2^(L-1) )
// modulo 2^W, the weighted sum being computed directly in 64-bit integers.
module tb_csa_accumulator;
  localparam int L = 16, W = L + 2;
  logic clk = 1'b0, rst, en, first, sign_ctrl;
  logic [W-1:0] p_in, s_nxt, c_nxt;
  int checks = 0, failures = 0;

  csa_accumulator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b1; first = 1'b0; sign_ctrl = 1'b0; p_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 300; r++) begin
      longint acc, expv;
      logic [W-1:0] got;
      acc = 0;
      for (int l = 0; l < L; l++) begin
        longint p;
        first = (l == 0);
        sign_ctrl = (l == L - 1);
        case (r % 4)
          0: p_in = W'($urandom);
          1: p_in = {1'b1, {(W-1){1'b0}}};      // most negative word
          2: p_in = {1'b0, {(W-1){1'b1}}};      // most positive word
          default: p_in = W'($urandom % 8) - W'(4);
        endcase
        p = longint'($signed(p_in));
        acc += (l == L - 1) ? -(p <<< l) : (p <<< l);
        // en low for one cycle in some runs: the state must hold
        if (r % 5 == 3 && l == 7) begin
          en = 1'b0; @(posedge clk); #1; en = 1'b1;
        end
        if (l == L - 1) begin
          #1;
          expv = acc >>> (L - 1);
          got = s_nxt + {c_nxt[W-2:0], 1'b0} + W'(1);
          checks++;
          if (got != W'(expv)) begin
            failures++;
            $display("FAIL run %0d got %0d exp %0d", r, $signed(got), expv);
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
