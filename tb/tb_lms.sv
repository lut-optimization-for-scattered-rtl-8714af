// tb_lms: end-to-end test of the DA LMS adaptive filter at its default size
// (N = 4 taps, L = 16 bits), used as a system-identification problem: the
// desired signal is a fixed 4-tap FIR filter h applied to the same random
// input, d(n) = sum_k h_k x(n-k), so the weights should move towards h.
// The testbench keeps a sample-level model of the algorithm, written with
// plain integer arithmetic (direct inner product, no distributed arithmetic):
//   y(n)   = floor( sum_k w_k(n) x(n-k) / 2^15 )
//   mu*e   = floor( (d(n-1) - y(n-1)) / 4 )                      (registered)
//   w_k   += +/- floor( x(n-2-k) / 2^(1 + i + lzc(|mu*e|)) ),  0 if mu*e = 0
// and after every sample-clock edge compares y_out, error_out and all
// weights with it. It also checks that a sample is taken every 16 clocks,
// and counts how often each mechanism happened: MSB-slice subtraction with a
// negative weight, weight increase, weight decrease, zero error (no update),
// a non-zero step-size shift, a stall by en, and a reset in mid-run. Finally the weights must
// have converged to h within a tolerance.
module tb_lms;
  localparam int L = 16, N = 4;
  logic clk = 1'b0, rst, en;
  logic signed [L-1:0] data_in, desired_in, error_out;
  logic [L-1:0] step_size;
  logic signed [L+1:0] y_out;
  logic signed [L-1:0] weights [N];
  logic sample_tick;
  int checks = 0, failures = 0;

  lms dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int xt [N];       // samples in the DA table, x(n) .. x(n-3)
  int xo [2];       // x(n-4), x(n-5)
  int wm [N];
  int y_q, d_q, mu_q;
  int hist [N];     // input history for the desired signal
  int h [N] = '{9830, -6554, 3277, -1638};   // 0.3, -0.2, 0.1, -0.05

  int n_neg_msb = 0, n_inc = 0, n_dec = 0, n_zero = 0, n_step = 0, n_stall = 0, n_reset = 0;

  function automatic int wrap(input int v, input int bits);
    longint m = longint'(1) << bits;
    longint r = longint'(v) % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return int'(r);
  endfunction

  function automatic int lzc(input int mag);
    for (int b = L - 2; b >= 0; b--) if (mag[b]) return L - 2 - b;
    return L - 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic model_tick(input int xin, input int din, input int i_shift);
    longint prod = 0;
    int y_new, e, mu_new, sgn, mag, t, xu;
    for (int k = 0; k < N; k++) prod += longint'(wm[k]) * longint'(xt[k]);
    y_new = wrap(int'(prod >>> (L - 1)), L + 2);
    e = wrap(d_q - y_q, L + 2);
    mu_new = e >>> 2;
    sgn = (mu_q < 0);
    mag = (mu_q < 0) ? -mu_q : mu_q;
    if (mag > 32767) mag = 32767;
    t = lzc(mag);
    if (t == L - 1) n_zero++;
    else if (sgn) n_dec++;
    else n_inc++;
    for (int k = 0; k < N; k++) begin
      xu = (k + 2 < N) ? xt[k+2] : xo[k+2-N];
      if (t != L - 1) begin
        int sh = 1 + i_shift + t;
        int inc = (sh >= 31) ? ((xu < 0) ? -1 : 0) : (xu >>> sh);
        wm[k] = wrap(sgn ? wm[k] - inc : wm[k] + inc, L);
      end
    end
    xo[1] = xo[0];
    xo[0] = xt[N-1];
    for (int k = N - 1; k > 0; k--) xt[k] = xt[k-1];
    xt[0] = xin;
    d_q = din;
    y_q = y_new;
    mu_q = mu_new;
  endtask

  initial begin
    int cyc = 0, last_tick = -1, samples = 0;
    int x_next, d_now, i_shift;
    logic tick_seen;
    int clkc = 0;
    rst = 1'b1; en = 1'b1; data_in = '0; desired_in = '0; step_size = '0;
    foreach (xt[k]) xt[k] = 0;
    foreach (wm[k]) wm[k] = 0;
    foreach (hist[k]) hist[k] = 0;
    xo[0] = 0; xo[1] = 0;
    y_q = 0; d_q = 0; mu_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    x_next = 0;
    while (samples < 3000) begin
      // a reset in the middle of the run: the filter must restart from zero
      if (samples == 1500 && n_reset == 0) begin
        rst = 1'b1;
        @(posedge clk);
        #1 rst = 1'b0;
        n_reset++;
        foreach (xt[k]) xt[k] = 0;
        foreach (wm[k]) wm[k] = 0;
        foreach (hist[k]) hist[k] = 0;
        xo[0] = 0; xo[1] = 0;
        y_q = 0; d_q = 0; mu_q = 0;
        last_tick = -1;
        for (int k = 0; k < N; k++) check(weights[k] == '0, "weights cleared by reset");
      end
      // stall the filter now and then
      en = !(samples % 97 == 5 && clkc % 16 == 3);
      if (!en) n_stall++;
      // smaller step for a stretch of samples
      i_shift = (samples >= 1000 && samples < 1200) ? 1 : 0;
      step_size = L'(i_shift);
      #1;
      if (sample_tick) begin
        if (last_tick >= 0)
          check(cyc - last_tick == L, $sformatf("sample period %0d clocks", cyc - last_tick));
        last_tick = cyc;
        // present x(n+1) and d(n): d is the reference filter on the history
        // that ends with the sample entering now as x(n)
        x_next = int'($signed(16'($urandom))) >>> 2;
        d_now = 0;
        for (int k = 0; k < N; k++) d_now += int'((longint'(h[k]) * hist[k]) >>> (L - 1));
        data_in = L'(x_next);
        desired_in = L'(d_now);
        if (i_shift != 0) n_step++;
        for (int k = 0; k < N; k++) if (wm[k] < 0) n_neg_msb++;
      end
      tick_seen = sample_tick;
      @(posedge clk);
      #1;
      clkc++;
      if (en) cyc++;
      if (tick_seen) begin
        model_tick(x_next, d_now, i_shift);
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_next;
        samples++;
        check(int'(y_out) == y_q, $sformatf("y_out %0d exp %0d at sample %0d", y_out, y_q, samples));
        check(int'(error_out) == mu_q, $sformatf("error_out %0d exp %0d at sample %0d", error_out, mu_q, samples));
        for (int k = 0; k < N; k++)
          check(int'(weights[k]) == wm[k], $sformatf("w[%0d] %0d exp %0d at sample %0d", k, weights[k], wm[k], samples));
      end
    end
    // convergence to the reference filter
    for (int k = 0; k < N; k++) begin
      $display("w[%0d] = %0d (target %0d)", k, weights[k], h[k]);
      check((int'(weights[k]) - h[k]) < 400 && (h[k] - int'(weights[k])) < 400, $sformatf("w[%0d] converged", k));
    end
    $display("mechanisms: negative-weight MSB slices %0d, increases %0d, decreases %0d, zero-error %0d, step shift %0d, stalls %0d, resets %0d",
             n_neg_msb, n_inc, n_dec, n_zero, n_step, n_stall, n_reset);
    check(n_neg_msb > 0, "negative weight / MSB subtraction exercised");
    check(n_inc > 0, "weight increase exercised");
    check(n_dec > 0, "weight decrease exercised");
    check(n_zero > 0, "zero-error case exercised");
    check(n_step > 0, "step-size shift exercised");
    check(n_stall > 0, "stall exercised");
    check(n_reset > 0, "reset during operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
