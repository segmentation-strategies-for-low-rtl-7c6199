// tb_seg_fir_workloads: runs the ten evaluation filters (five lowpass, five
// bandpass, 32 to 89 taps) through 89-tap filters at 8, 16 and 24 bits in all
// three representations (nine filters side by side).
//
// Coefficients are designed here by the window method: an ideal lowpass
// h[k] = 2*fc/fs * sinc(2*fc/fs*(k - (L-1)/2)), or the difference of two for
// a bandpass, with each cut-off midway across its transition band, the
// sampling rate taken as twice the highest band edge, and the named window
// (Hamming, Kaiser with beta from the stopband attenuation, Blackman;
// Hamming where none is named). They are quantised to W bits with the
// largest tap at full scale; taps beyond the filter length L are zero.
// Each filter gets 60 zero-mean uniform random samples; every output is
// checked against a direct convolution.
//
// For each instance it counts the bit toggles at the multiplier's coefficient
// input in consecutive tap cycles and prints them next to the toggles the raw
// two's complement coefficients would cause there (a conventional filter);
// the segmented filter must toggle less.
module tb_seg_fir_workloads;
  import seg_pkg::*;

  localparam int  N  = 89;
  localparam int  NF = 10;
  localparam int  NS = 60;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Filter specifications: band edges in kHz, window, attenuation, length.
  // kind 0 = lowpass (edges pb_hi, sb_lo, fs_half), 1 = bandpass
  // (sb1_hi, pb_lo, pb_hi, sb2_lo, fs_half). win: 0 Hamming, 1 Kaiser,
  // 2 Blackman.
  typedef struct {
    int  kind;
    real e0, e1, e2, e3, e4;
    int  win;
    real att;
    int  len;
  } spec_t;

  function automatic spec_t spec(int f);
    case (f)
      0: return '{0, 1.5,   2.0,   4.0,   0.0,   0.0,   0, 50.0, 53};
      1: return '{0, 1.2,   1.7,   5.0,   0.0,   0.0,   1, 40.0, 71};
      2: return '{0, 3.375, 5.625, 10.0,  0.0,   0.0,   0, 90.0, 42};
      3: return '{0, 1.0,   1.5,   5.0,   0.0,   0.0,   0, 56.0, 61};
      4: return '{0, 1.5,   2.0,   4.0,   0.0,   0.0,   2, 50.0, 89};
      5: return '{1, 0.1,   0.15,  0.25,  0.3,   0.5,   1, 60.0, 73};
      6: return '{1, 0.45,  0.9,   1.1,   1.55,  7.5,   0, 30.0, 34};
      7: return '{1, 5.0,   8.0,   12.0,  15.0,  44.14, 1, 60.0, 54};
      8: return '{1, 1.0,   2.0,   3.5,   4.25,  5.0,   0, 56.4, 32};
      default: return '{1, 0.1, 1.375, 3.625, 4.0, 5.0, 0, 68.4, 80};
    endcase
  endfunction

  function automatic real sinc(real t);
    if (t == 0.0) return 1.0;
    return $sin(PI * t) / (PI * t);
  endfunction

  function automatic real bessel_i0(real x);
    real s = 1.0, term = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      s += term;
    end
    return s;
  endfunction

  // Real-valued tap k of filter f (0 beyond its length).
  function automatic real tap(int f, int k);
    spec_t sp = spec(f);
    real fs, c1, c2, t, w, beta, r;
    if (k >= sp.len) return 0.0;
    t = k - (sp.len - 1) / 2.0;
    r = 2.0 * k / (sp.len - 1) - 1.0;
    case (sp.win)
      1: begin
        beta = (sp.att > 50.0) ? 0.1102 * (sp.att - 8.7)
                               : 0.5842 * (sp.att - 21.0) ** 0.4 + 0.07886 * (sp.att - 21.0);
        w = bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
      end
      2: w = 0.42 - 0.5 * $cos(2.0 * PI * k / (sp.len - 1)) + 0.08 * $cos(4.0 * PI * k / (sp.len - 1));
      default: w = 0.54 - 0.46 * $cos(2.0 * PI * k / (sp.len - 1));
    endcase
    if (sp.kind == 0) begin
      fs = 2.0 * sp.e2;
      c1 = (sp.e0 + sp.e1) / 2.0 / fs;
      return w * 2.0 * c1 * sinc(2.0 * c1 * t);
    end
    fs = 2.0 * sp.e4;
    c1 = (sp.e0 + sp.e1) / 2.0 / fs;
    c2 = (sp.e2 + sp.e3) / 2.0 / fs;
    return w * (2.0 * c2 * sinc(2.0 * c2 * t) - 2.0 * c1 * sinc(2.0 * c1 * t));
  endfunction

  localparam int NI = 9;
  bit done [NI];

  for (genvar g = 0; g < NI; g++) begin : g_inst
    localparam int    W    = (g / 3 == 0) ? 8 : (g / 3 == 1) ? 16 : 24;
    localparam repr_e REPR = (g % 3 == 0) ? REPR_MIXED : (g % 3 == 1) ? REPR_TWOS : REPR_SIGNMAG;
    localparam int    AW   = $clog2(N);
    localparam int    AC   = 2 * W + $clog2(N);

    logic          coef_we, coef_ready, x_valid, x_ready, y_valid;
    logic [AW-1:0] coef_addr;
    logic [W-1:0]  coef, x;
    logic [AC-1:0] y;

    seg_fir #(.N_TAPS(N), .W(W), .REPR(REPR)) u_dut (
      .clk, .rst_n,
      .coef_we_i(coef_we), .coef_addr_i(coef_addr), .coef_i(coef), .coef_ready_o(coef_ready),
      .x_valid_i(x_valid), .x_i(x), .x_ready_o(x_ready),
      .y_valid_o(y_valid), .y_o(y));

    longint h [N];
    longint hist [$];
    int     outputs = 0;
    int     expected_outputs = 0;
    longint seg_tog = 0, raw_tog = 0;
    logic [W-1:0] prev_b, prev_raw;
    bit     have_prev = 0;
    logic [W-1:0] mult_b;

    if (REPR == REPR_SIGNMAG) begin : g_b
      assign mult_b = u_dut.tap_m;
    end else begin : g_b
      assign mult_b = u_dut.g_tc.mult_b;
    end

    always @(negedge clk) if (rst_n && u_dut.acc_en) begin
      logic [W-1:0] raw;
      raw = W'(h[u_dut.cmem_raddr]);
      if (have_prev) begin
        seg_tog += $countones(mult_b ^ prev_b);
        raw_tog += $countones(raw ^ prev_raw);
      end
      prev_b = mult_b;
      prev_raw = raw;
      have_prev = 1;
    end

    always @(negedge clk) if (rst_n && y_valid) begin
      longint want;
      int n;
      want = 0;
      n    = outputs;
      for (int k = 0; k < N && k <= n; k++) want += h[k] * hist[n - k];
      checks++;
      if (longint'($signed(y)) != want)
        fail($sformatf("W=%0d %s y[%0d]=%0d expected %0d", W, REPR.name(), n, longint'($signed(y)), want));
      outputs++;
    end

    initial begin
      real hr [N];
      real peak;
      coef_we = 0; coef_addr = '0; coef = '0; x_valid = 0; x = '0;
      @(posedge rst_n);
      for (int f = 0; f < NF; f++) begin
        peak = 0.0;
        for (int k = 0; k < N; k++) begin
          hr[k] = tap(f, k);
          if ((hr[k] < 0 ? -hr[k] : hr[k]) > peak) peak = (hr[k] < 0 ? -hr[k] : hr[k]);
        end
        // Wait for the previous output, then load.
        while (!coef_ready || expected_outputs != outputs) @(negedge clk);
        for (int k = 0; k < N; k++) begin
          real q;
          q = hr[k] / peak * real'((longint'(1) << (W - 1)) - 1);
          h[k] = longint'($rtoi(q + (q >= 0.0 ? 0.5 : -0.5)));
          @(negedge clk);
          coef_we = 1; coef_addr = AW'(k); coef = W'(h[k]);
        end
        @(negedge clk);
        coef_we = 0;
        for (int s = 0; s < NS; s++) begin
          longint v, mag;
          if (REPR == REPR_SIGNMAG) begin
            mag = longint'({$urandom, $urandom}) & ((longint'(1) << (W - 1)) - 1);
            v = ($urandom % 2) ? -mag : mag;
            x = {v < 0, (W - 1)'(mag)};
          end else begin
            v = longint'($signed(W'({$urandom, $urandom})));
            x = W'(v);
          end
          x_valid = 1;
          while (!x_ready) @(negedge clk);
          @(negedge clk);
          hist.push_back(v);
          expected_outputs++;
          x_valid = 0;
        end
      end
      while (expected_outputs != outputs) @(negedge clk);
      $display("W=%0d %-12s: %0d outputs checked; coefficient-input toggles segmented %0d, raw two's complement %0d (%0d%% fewer)",
               W, REPR.name(), outputs, seg_tog, raw_tog, 100 - 100 * seg_tog / raw_tog);
      checks++;
      if (seg_tog >= raw_tog) fail($sformatf("W=%0d %s: no toggle reduction", W, REPR.name()));
      done[g] = 1;
    end
  end

  initial begin
    for (int i = 0; i < NI; i++) done[i] = 0;
    #22 rst_n = 1;
    for (int i = 0; i < NI; i++) wait (done[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * (NS + 2) * (N + 2) + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
