// tb_fir_control: checks the tap sequencer for N = 5 and the default N = 89.
// For each accepted sample it follows the N run cycles and checks the
// coefficient address (k), the data address (newest sample minus k, modulo
// N, with the write pointer wrapping), clear on the first tap only, enable
// on all taps, no sample accepted while running even with in_valid held
// high, and an out_valid pulse exactly N cycles after the accepting edge,
// with ready back in that cycle (one sample per N+1 cycles).
module tb_fir_control;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // One instance per size, driven by a generic checker.
  for (genvar g = 0; g < 2; g++) begin : g_dut
    localparam int N  = (g == 0) ? 5 : 89;
    localparam int AW = $clog2(N);
    logic          in_valid, in_ready, coef_ready, dwe, aen, aclr, ovalid;
    logic [AW-1:0] dwaddr, draddr, craddr;
    int            samples = 0;
    bit            done = 0;

    if (g == 0) begin : g_small
      fir_control #(.N(5)) u_dut (.clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready),
        .coef_ready_o(coef_ready), .dmem_we_o(dwe), .dmem_waddr_o(dwaddr),
        .dmem_raddr_o(draddr), .cmem_raddr_o(craddr), .acc_en_o(aen),
        .acc_clear_o(aclr), .out_valid_o(ovalid));
    end else begin : g_dflt
      fir_control u_dut (.clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready),
        .coef_ready_o(coef_ready), .dmem_we_o(dwe), .dmem_waddr_o(dwaddr),
        .dmem_raddr_o(draddr), .cmem_raddr_o(craddr), .acc_en_o(aen),
        .acc_clear_o(aclr), .out_valid_o(ovalid));
    end

    initial begin
      int wp = 0;
      in_valid = 0;
      @(posedge rst_n);
      repeat (2 * N + 3) begin
        @(negedge clk);
        // Idle for a random while, then offer a sample and keep it offered.
        repeat ($urandom % 3) begin
          checks++;
          if (!in_ready || !coef_ready || aen) fail($sformatf("N=%0d idle state", N));
          @(negedge clk);
        end
        in_valid = 1;
        #1;
        checks++;
        if (!in_ready || !dwe || int'(dwaddr) != wp) fail($sformatf("N=%0d accept wp=%0d", N, wp));
        @(negedge clk);
        for (int k = 0; k < N; k++) begin
          int want;
          want = (wp - k + N) % N;
          checks++;
          if (in_ready || coef_ready || dwe || !aen || (aclr != (k == 0)) ||
              int'(craddr) != k || int'(draddr) != want || ovalid)
            fail($sformatf("N=%0d tap %0d craddr=%0d draddr=%0d want %0d", N, k, craddr, draddr, want));
          if (k == N - 1) in_valid = ($urandom % 2);
          @(negedge clk);
        end
        checks++;
        if (!ovalid || !in_ready || aen) fail($sformatf("N=%0d output cycle", N));
        samples++;
        wp = (wp + 1) % N;
        if (in_valid) begin
          // Back-to-back sample accepted in the output cycle.
          checks++;
          if (!dwe || int'(dwaddr) != wp) fail($sformatf("N=%0d back-to-back accept", N));
          @(negedge clk);
          for (int k = 0; k < N; k++) @(negedge clk);
          checks++;
          if (!ovalid) fail($sformatf("N=%0d back-to-back output", N));
          samples++;
          wp = (wp + 1) % N;
        end
        in_valid = 0;
      end
      done = 1;
    end
  end

  initial begin
    #22 rst_n = 1;
    wait (g_dut[0].done && g_dut[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
