// tb_sign_mag_separator: sign and magnitude of random and corner values,
// the magnitude computed as an integer absolute value (clamped to 2^(L-1)-1).
module tb_sign_mag_separator;
  localparam int L = 16;
  logic signed [L-1:0] mu_e;
  logic sign;
  logic [L-2:0] mag;
  int checks = 0, failures = 0;

  sign_mag_separator #(.L(L)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 1000; r++) begin
      int v, a;
      case (r)
        0: v = -32768;
        1: v = 32767;
        2: v = 0;
        3: v = -1;
        4: v = 1;
        default: v = int'($signed(16'($urandom)));
      endcase
      mu_e = L'(v);
      #1;
      a = (v < 0) ? -v : v;
      if (a > 32767) a = 32767;
      checks++;
      if (sign != (v < 0) || int'(mag) != a) begin
        failures++;
        $display("FAIL v=%0d sign=%0b mag=%0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
