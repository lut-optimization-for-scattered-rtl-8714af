// tb_bit_timer: checks the bit counter against a cycle count kept by the
// testbench: bit_idx runs 0..L-1, first/last/tick mark bit cycles 0 and L-1,
// a tick comes every L enabled cycles, and the counter holds while en is low.
module tb_bit_timer;
  localparam int L = 16;
  logic clk = 1'b0, rst, en;
  logic [$clog2(L)-1:0] bit_idx;
  logic first, last, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, ticks = 0;

  bit_timer #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    rst = 1'b1; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0; en = 1'b1;
    exp_idx = 0;
    for (int i = 0; i < 20 * L; i++) begin
      // hold en low for a few cycles now and then
      en = !((i % 37) inside {[30:33]});
      #1;
      check(bit_idx == exp_idx[$clog2(L)-1:0], $sformatf("bit_idx %0d exp %0d", bit_idx, exp_idx));
      check(first == (exp_idx == 0), "first");
      check(last == (exp_idx == L - 1), "last");
      check(tick == (exp_idx == L - 1 && en), "tick");
      if (tick) begin
        if (last_tick >= 0) check(cyc - last_tick == L, $sformatf("tick spacing %0d", cyc - last_tick));
        last_tick = cyc;
        ticks++;
      end
      @(posedge clk);
      #1;
      if (en) begin
        cyc++;
        exp_idx = (exp_idx + 1) % L;
      end
    end
    check(ticks >= 18, "enough ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
