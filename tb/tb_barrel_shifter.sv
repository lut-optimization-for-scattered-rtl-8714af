// tb_barrel_shifter: every shift count with random and extreme samples;
// the result must equal x divided by 2^t and rounded down, and 0 for the
// zero-error code t = L-1.
module tb_barrel_shifter;
  localparam int L = 16, TW = 4;
  logic signed [L-1:0] x, y;
  logic [TW-1:0] t;
  int checks = 0, failures = 0;

  barrel_shifter #(.L(L), .TW(TW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 100; r++) begin
      int xv, expv;
      xv = (r == 0) ? -32768 : (r == 1) ? 32767 : (r == 2) ? -1 : int'($signed(16'($urandom)));
      for (int s = 0; s < 2**TW; s++) begin
        x = L'(xv); t = TW'(s);
        #1;
        if (s == L - 1) expv = 0;
        else expv = int'($floor(real'(xv) / real'(2 ** s)));
        checks++;
        if (int'(y) != expv) begin
          failures++;
          $display("FAIL x=%0d t=%0d y=%0d exp %0d", xv, s, y, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
