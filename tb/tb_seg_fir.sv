// tb_seg_fir: end-to-end test of the segmented-coefficient FIR filter.
//
// Four filters run side by side: 8 taps at 8 bits in each representation
// (mixed mode, two's complement, sign-magnitude) and 13 taps at 16 bits in
// mixed mode. Each one is loaded with a coefficient set that contains the
// corner cases of the segmentation (largest positive and negative values,
// zero, powers of two, the 127 = 128 - 1 case, ties between two powers),
// fed 3*N random samples with random gaps, reloaded with a random set and fed
// 2*N more. Every output is compared with a direct convolution of the raw
// coefficients with the accepted samples, and its latency must be exactly N
// cycles after the accepting edge.
//
// The mechanisms of the design are counted and each must occur: stalls (a
// sample offered while busy), back-to-back acceptance in the output cycle,
// coefficient writes refused while busy, and, counted over the taps of the
// checked outputs with a reference segmentation: zero coefficients, pure
// shifts (m = 0), subtraction of the shifted term and (outside the two's
// complement rule, where m is never negative) subtraction of the product.
module tb_seg_fir;
  import seg_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  localparam int NI = 4;
  bit done [NI];

  for (genvar g = 0; g < NI; g++) begin : g_inst
    localparam int    N    = (g == 3) ? 13 : 8;
    localparam int    W    = (g == 3) ? 16 : 8;
    localparam repr_e REPR = (g == 1) ? REPR_TWOS : (g == 2) ? REPR_SIGNMAG : REPR_MIXED;
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

    longint h_cur [N];
    longint hist [$];          // accepted samples, oldest first
    longint acc_cycle [$];     // cycle of each accepting edge
    longint hsets [$][N];      // coefficient set in use for each sample
    int outputs = 0;
    int n_stall = 0, n_b2b = 0, n_refused = 0, n_zero = 0, n_pow2 = 0;
    int n_shf_sub = 0, n_prod_sub = 0;

    function automatic logic [W-1:0] enc_x(longint v);
      if (REPR == REPR_SIGNMAG) return {v < 0, (W - 1)'(v < 0 ? -v : v)};
      return W'(v);
    endfunction

    function automatic longint rand_x();
      if (REPR == REPR_SIGNMAG) begin
        longint m = longint'($urandom) & ((longint'(1) << (W - 1)) - 1);
        return ($urandom % 2) ? -m : m;
      end
      return longint'($signed(W'($urandom)));
    endfunction

    function automatic longint corner_h(int k);
      case (k)
        0: return (longint'(1) << (W - 1)) - 1;
        1: return -(longint'(1) << (W - 1));
        2: return 0;
        3: return longint'(1) << (W - 2);
        4: return -1;
        5: return 3 * (longint'(1) << (W - 3));
        6: return -((longint'(1) << (W - 2)) + 3);
        7: return 5;
        default: return longint'($signed(W'($urandom))) >>> ($urandom % W);
      endcase
    endfunction

    // Reference segmentation of one coefficient, walking the algorithm.
    task automatic ref_seg(input longint h, output longint sv, output longint mv);
      longint a = (h < 0) ? -h : h;
      longint dh, dl;
      int i = 0;
      if (h == 0) begin sv = 0; mv = 0; return; end
      while ((longint'(1) << i) < a) i++;
      if (REPR == REPR_TWOS) begin
        if ((longint'(1) << i) == a) sv = h;
        else if (h > 0)              sv = longint'(1) << (i - 1);
        else                         sv = -(longint'(1) << i);
        mv = h - sv;
      end else begin
        dh = 2 * (a - (longint'(1) << i));  if (dh < 0) dh = -dh;
        dl = 2 * a - (longint'(1) << i);    if (dl < 0) dl = -dl;
        if (dh < dl) sv = longint'(1) << i;
        else         sv = (i == 0) ? 0 : (longint'(1) << (i - 1));
        mv = a - sv;
        if (h < 0) begin sv = -sv; mv = -mv; end
      end
    endtask

    // Mechanisms exercised by the taps of output n, from the reference.
    task automatic count_taps(int n);
      longint sv, mv, xv;
      for (int k = 0; k < N && k <= n; k++) begin
        xv = hist[n - k];
        ref_seg(hsets[n][k], sv, mv);
        if (hsets[n][k] == 0) n_zero++;
        else if (mv == 0) n_pow2++;
        if (sv != 0 && ((REPR == REPR_SIGNMAG) ? ((sv < 0) != (xv < 0)) : (sv < 0))) n_shf_sub++;
        if (mv != 0 && ((REPR == REPR_SIGNMAG) ? ((mv < 0) != (xv < 0)) : (mv < 0))) n_prod_sub++;
      end
    endtask

    task automatic load_coefs(bit corners);
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        h_cur[k]  = corners ? corner_h(k) : longint'($signed(W'($urandom)));
        coef_we   = 1;
        coef_addr = AW'(k);
        coef      = W'(h_cur[k]);
        if (!coef_ready) fail($sformatf("inst %0d coef not ready when idle", g));
      end
      @(negedge clk);
      coef_we = 0;
    endtask

    task automatic send(int count);
      for (int s = 0; s < count; s++) begin
        longint v = rand_x();
        int gap = $urandom % 3;
        repeat (gap) begin
          @(negedge clk);
          x_valid = 0;
        end
        @(negedge clk);
        x_valid = 1;
        x       = enc_x(v);
        while (!x_ready) begin
          n_stall++;
          // While busy, a coefficient write must be refused.
          if (($urandom % 4) == 0) begin
            coef_we = 1; coef_addr = '0; coef = W'($urandom);
            n_refused++;
          end
          @(negedge clk);
          coef_we = 0;
        end
        if (y_valid) n_b2b++;
        @(posedge clk);
        #1;
        hist.push_back(v);
        acc_cycle.push_back(cycle);
        hsets.push_back(h_cur);
      end
      @(negedge clk);
      x_valid = 0;
    endtask

    // Output checker.
    always @(negedge clk) if (rst_n && y_valid) begin
      longint want;
      int n;
      want = 0;
      n    = outputs;
      if (n >= hist.size()) fail($sformatf("inst %0d output without input", g));
      else begin
        for (int k = 0; k < N && k <= n; k++) want += hsets[n][k] * hist[n - k];
        checks++;
        if (longint'($signed(y)) != want)
          fail($sformatf("inst %0d y[%0d]=%0d expected %0d", g, n, longint'($signed(y)), want));
        checks++;
        if (cycle - acc_cycle[n] != N)
          fail($sformatf("inst %0d latency %0d, expected %0d", g, cycle - acc_cycle[n], N));
      end
      if (n < hist.size()) count_taps(n);
      outputs++;
    end

    initial begin
      coef_we = 0; coef_addr = '0; coef = '0; x_valid = 0; x = '0;
      @(posedge rst_n);
      load_coefs(1);
      send(3 * N);
      repeat (N + 2) @(negedge clk);
      load_coefs(0);
      send(2 * N);
      repeat (N + 3) @(negedge clk);
      checks++;
      if (outputs != 5 * N) fail($sformatf("inst %0d: %0d outputs, expected %0d", g, outputs, 5 * N));
      $display("inst %0d (N=%0d W=%0d %s): stalls=%0d back_to_back=%0d refused_coef_writes=%0d zero_coefs=%0d pure_shifts=%0d shift_subtracts=%0d product_subtracts=%0d",
               g, N, W, REPR.name(), n_stall, n_b2b, n_refused, n_zero, n_pow2, n_shf_sub, n_prod_sub);
      checks += 6;
      if (n_stall == 0)    fail($sformatf("inst %0d: no stall", g));
      if (n_b2b == 0)      fail($sformatf("inst %0d: no back-to-back sample", g));
      if (n_refused == 0)  fail($sformatf("inst %0d: no refused coefficient write", g));
      if (n_zero == 0)     fail($sformatf("inst %0d: no zero coefficient", g));
      if (n_pow2 == 0)     fail($sformatf("inst %0d: no pure shift", g));
      if (n_shf_sub == 0)  fail($sformatf("inst %0d: no shift subtract", g));
      if (REPR != REPR_TWOS) begin
        checks++;
        if (n_prod_sub == 0) fail($sformatf("inst %0d: no product subtract", g));
      end
      done[g] = 1;
    end
  end

  initial begin
    for (int i = 0; i < NI; i++) done[i] = 0;
    #22 rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
