// tb_coef_segmenter: checks the coefficient segmentation against a reference
// that walks the algorithm step by step (i = i + 1 until 2^i >= |h|, then the
// stage 2 and stage 3 rules). Every 8-bit coefficient is tried for the two's
// complement rule and the sign-magnitude rule, plus random and corner 16-bit
// coefficients on the default (mixed-mode) instance. Each case checks that
// s + m = h and that s and m are exactly the reference's, and the worked
// example h = 127 is checked for both rules (64 + 63 and 128 + (-1)).
module tb_coef_segmenter;
  import seg_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  h8;
  logic [7:0]  m_t8, m_s8;
  logic [2:0]  e_t8, e_s8;
  logic        n_t8, n_s8, z_t8, z_s8;
  logic [15:0] h16, m16;
  logic [3:0]  e16;
  logic        n16, z16;

  coef_segmenter #(.W(8), .REPR(REPR_TWOS)) u_twos (
    .h_i(h8), .m_o(m_t8), .s_exp_o(e_t8), .s_neg_o(n_t8), .s_zero_o(z_t8));
  coef_segmenter #(.W(8), .REPR(REPR_SIGNMAG)) u_sm (
    .h_i(h8), .m_o(m_s8), .s_exp_o(e_s8), .s_neg_o(n_s8), .s_zero_o(z_s8));
  coef_segmenter u_dflt (
    .h_i(h16), .m_o(m16), .s_exp_o(e16), .s_neg_o(n16), .s_zero_o(z16));

  function automatic longint s_value(bit zero, bit neg, int unsigned e);
    if (zero) return 0;
    return neg ? -(longint'(1) << e) : (longint'(1) << e);
  endfunction

  function automatic longint sm_value(logic [15:0] v, int w);
    longint mag = longint'(v) & ((longint'(1) << (w - 1)) - 1);
    return v[w-1] ? -mag : mag;
  endfunction

  // Reference segmentation, two's complement rule.
  task automatic ref_twos(input longint h, output longint s, output longint m);
    longint a = (h < 0) ? -h : h;
    int i = 0;
    if (h == 0) begin s = 0; m = 0; return; end
    while ((longint'(1) << i) < a) i++;
    if ((longint'(1) << i) == a) s = h;
    else if (h > 0)              s = longint'(1) << (i - 1);
    else                         s = -(longint'(1) << i);
    m = h - s;
  endtask

  // Reference segmentation, sign-magnitude rule; distances doubled so that
  // 2^(i-1) stays an integer when i = 0.
  task automatic ref_sm(input longint h, output longint s, output longint m);
    longint a = (h < 0) ? -h : h;
    longint dh, dl;
    int i = 0;
    if (h == 0) begin s = 0; m = 0; return; end
    while ((longint'(1) << i) < a) i++;
    dh = 2 * (a - (longint'(1) << i));  if (dh < 0) dh = -dh;
    dl = 2 * a - (longint'(1) << i);    if (dl < 0) dl = -dl;
    if (dh < dl) begin m = a - (longint'(1) << i);  s = longint'(1) << i; end
    else         begin s = (i == 0) ? 0 : (longint'(1) << (i - 1)); m = a - s; end
    if (h < 0) begin s = -s; m = -m; end
  endtask

  task automatic check(string what, longint h, longint s_got, longint m_got,
                       longint s_exp, longint m_exp);
    checks++;
    if (s_got != s_exp || m_got != m_exp || s_got + m_got != h) begin
      failures++;
      $display("FAIL %s h=%0d: got s=%0d m=%0d, expected s=%0d m=%0d",
               what, h, s_got, m_got, s_exp, m_exp);
    end
  endtask

  initial begin
    longint h, s, m;
    // Exhaustive 8-bit.
    for (int v = -128; v < 128; v++) begin
      h8 = 8'(v);
      #1;
      h = v;
      ref_twos(h, s, m);
      check("twos8", h, s_value(z_t8, n_t8, e_t8), longint'($signed(m_t8)), s, m);
      if (v != 0 && $signed(m_t8) < 0) begin
        checks++; failures++;
        $display("FAIL twos8 h=%0d: negative m", v);
      end
      ref_sm(h, s, m);
      check("sm8", h, s_value(z_s8, n_s8, e_s8), sm_value(16'(m_s8), 8), s, m);
    end
    // Worked example h = 127.
    h8 = 8'd127; #1;
    checks++;
    if (!(s_value(z_t8, n_t8, e_t8) == 64 && $signed(m_t8) == 63)) begin
      failures++; $display("FAIL twos 127 != 64 + 63");
    end
    checks++;
    if (!(s_value(z_s8, n_s8, e_s8) == 128 && sm_value(16'(m_s8), 8) == -1)) begin
      failures++; $display("FAIL sm 127 != 128 + (-1)");
    end
    // 16-bit default instance (mixed mode uses the sign-magnitude rule).
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: h16 = 16'h8000;
        1: h16 = 16'h7fff;
        2: h16 = 16'h0000;
        3: h16 = 16'h0001;
        4: h16 = 16'hffff;
        5: h16 = 16'h4000;
        6: h16 = 16'h6000;
        default: h16 = 16'($urandom) >> ($urandom % 16);
      endcase
      if (n > 6 && $urandom % 2) h16 = -h16;
      #1;
      h = longint'($signed(h16));
      ref_sm(h, s, m);
      check("mixed16", h, s_value(z16, n16, e16), sm_value(m16, 16), s, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
