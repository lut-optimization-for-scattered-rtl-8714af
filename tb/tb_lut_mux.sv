// tb_lut_mux: fills the 16 inputs with random words and checks that every
// address selects its own word.
module tb_lut_mux;
  localparam int N = 4, W = 18;
  logic signed [W-1:0] entry [2**N];
  logic [N-1:0] sel;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  lut_mux #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      logic signed [W-1:0] ref_w [2**N];
      for (int k = 0; k < 2**N; k++) begin ref_w[k] = W'($urandom); entry[k] = ref_w[k]; end
      for (int k = 0; k < 2**N; k++) begin
        sel = N'(k);
        #1;
        checks++;
        if (y !== ref_w[k]) begin failures++; $display("FAIL sel %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
