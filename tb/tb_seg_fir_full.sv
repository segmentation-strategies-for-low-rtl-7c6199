// tb_seg_fir_full: the filter at its default configuration (89 taps, 16-bit
// mixed mode) through one complete job. It designs an 89-tap Blackman-window
// lowpass (passband edge 1.5 kHz, stopband edge 2 kHz, 8 kHz sampling, cut-off
// midway at 1.75 kHz) from h[k] = w[k] * 2*fc/fs * sinc(2*fc/fs*(k - 44)),
// quantises it to 16 bits with the largest tap at 2^14, loads it, filters
// 300 zero-mean uniformly distributed samples and compares every output with
// a direct convolution and checks the 89-cycle latency.
//
// It also counts the bit toggles between the coefficient operands that reach
// the multiplier in consecutive tap cycles, and compares them with the
// toggles the raw two's complement coefficients would cause on the same port;
// segmentation must reduce them.
module tb_seg_fir_full;

  localparam int N = 89, W = 16, AW = $clog2(N);
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic          coef_we, coef_ready, x_valid, x_ready, y_valid;
  logic [AW-1:0] coef_addr;
  logic [W-1:0]  coef, x;
  logic [38:0]   y;

  seg_fir u_dut (
    .clk, .rst_n,
    .coef_we_i(coef_we), .coef_addr_i(coef_addr), .coef_i(coef), .coef_ready_o(coef_ready),
    .x_valid_i(x_valid), .x_i(x), .x_ready_o(x_ready),
    .y_valid_o(y_valid), .y_o(y));

  longint h [N];
  longint hist [$];
  longint acc_cycle [$];
  int outputs = 0;
  longint seg_toggles = 0, raw_toggles = 0;
  logic [W-1:0] prev_b, prev_raw;
  bit have_prev = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic real sinc(real t);
    if (t == 0.0) return 1.0;
    return $sin(PI * t) / (PI * t);
  endfunction

  // Toggles at the multiplier's coefficient input, per tap cycle.
  always @(negedge clk) if (rst_n && u_dut.acc_en) begin
    logic [W-1:0] raw;
    raw = W'(h[u_dut.cmem_raddr]);
    if (have_prev) begin
      seg_toggles += $countones(u_dut.g_tc.mult_b ^ prev_b);
      raw_toggles += $countones(raw ^ prev_raw);
    end
    prev_b    = u_dut.g_tc.mult_b;
    prev_raw  = raw;
    have_prev = 1;
  end

  always @(negedge clk) if (rst_n && y_valid) begin
    longint want;
    int n;
    want = 0;
    n    = outputs;
    for (int k = 0; k < N && k <= n; k++) want += h[k] * hist[n - k];
    checks += 2;
    if (longint'($signed(y)) != want)
      fail($sformatf("y[%0d]=%0d expected %0d", n, longint'($signed(y)), want));
    if (cycle - acc_cycle[n] != N)
      fail($sformatf("latency %0d, expected %0d", cycle - acc_cycle[n], N));
    outputs++;
  end

  initial begin
    real hr [N];
    real peak, fc;
    coef_we = 0; coef_addr = '0; coef = '0; x_valid = 0; x = '0;
    fc = 1.75 / 8.0;
    peak = 0.0;
    for (int k = 0; k < N; k++) begin
      real wk;
      wk = 0.42 - 0.5 * $cos(2.0 * PI * k / (N - 1)) + 0.08 * $cos(4.0 * PI * k / (N - 1));
      hr[k] = wk * 2.0 * fc * sinc(2.0 * fc * (k - (N - 1) / 2.0));
      if (hr[k] > peak) peak = hr[k];
    end
    for (int k = 0; k < N; k++) h[k] = longint'($rtoi(hr[k] / peak * 16384.0 + (hr[k] >= 0 ? 0.5 : -0.5)));
    #22 rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(k); coef = W'(h[k]);
    end
    @(negedge clk);
    coef_we = 0;
    for (int s = 0; s < 300; s++) begin
      longint v;
      v = longint'($signed(W'($urandom)));
      @(negedge clk);
      x_valid = 1;
      x = W'(v);
      while (!x_ready) @(negedge clk);
      @(posedge clk);
      #1;
      hist.push_back(v);
      acc_cycle.push_back(cycle);
    end
    @(negedge clk);
    x_valid = 0;
    repeat (N + 3) @(negedge clk);
    checks++;
    if (outputs != 300) fail($sformatf("%0d outputs, expected 300", outputs));
    $display("multiplier coefficient-input toggles: segmented %0d, raw coefficients %0d (%0d%% fewer)",
             seg_toggles, raw_toggles, 100 - 100 * seg_toggles / raw_toggles);
    checks++;
    if (seg_toggles >= raw_toggles) fail("segmentation did not reduce multiplier input toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
