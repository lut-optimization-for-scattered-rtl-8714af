// tb_bit_serial_converter: random weights; for every bit index the slice must
// hold bit l of each weight, weight k in bit k.
module tb_bit_serial_converter;
  localparam int L = 16, N = 4;
  logic signed [L-1:0] w [N];
  logic [$clog2(L)-1:0] bit_idx;
  logic [N-1:0] a_slice;
  int checks = 0, failures = 0;

  bit_serial_converter #(.L(L), .N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      int wv [N];
      for (int k = 0; k < N; k++) begin wv[k] = int'($urandom % 65536); w[k] = L'(wv[k]); end
      for (int l = 0; l < L; l++) begin
        bit_idx = 4'(l);
        #1;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (a_slice[k] != bit'((wv[k] / (2 ** l)) % 2)) begin
            failures++;
            $display("FAIL r=%0d l=%0d k=%0d", r, l, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
