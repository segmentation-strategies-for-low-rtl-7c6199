// tb_sm_array_mult: checks the sign-magnitude array multiplier: every pair of
// 8-bit sign-magnitude operands, then random and corner operands for the
// default 16-bit and a 24-bit instance. The expected product is computed from
// the decoded operand values; the sign must be the XOR of the operand signs.
module tb_sm_array_mult;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [14:0] p8;
  logic [15:0] a16, b16;
  logic [30:0] p16;
  logic [23:0] a24, b24;
  logic [46:0] p24;

  sm_array_mult #(.W(8))  u8  (.a_i(a8),  .b_i(b8),  .p_o(p8));
  sm_array_mult           u16 (.a_i(a16), .b_i(b16), .p_o(p16));
  sm_array_mult #(.W(24)) u24 (.a_i(a24), .b_i(b24), .p_o(p24));

  function automatic longint smv(longint v, int w);
    longint mag = v & ((longint'(1) << (w - 1)) - 1);
    return ((v >> (w - 1)) & 1) ? -mag : mag;
  endfunction

  task automatic check(int w, longint a, longint b, longint p);
    longint want = smv(a, w) * smv(b, w);
    longint got  = smv(p, 2 * w - 1);
    bit     sgn  = ((p >> (2 * w - 2)) & 1) != 0;
    bit     sgn_want = (((a >> (w - 1)) ^ (b >> (w - 1))) & 1) != 0;
    checks++;
    if (got != want || sgn != sgn_want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d-bit %h * %h = %h", w, a, b, p);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        #1;
        check(8, a, b, longint'(p8));
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a24 = (n % 5 == 0) ? 24'h7fffff : 24'($urandom);
      b24 = (n % 7 == 0) ? 24'hffffff : 24'($urandom);
      a16 = a24[15:0]; b16 = b24[23:8];
      #1;
      check(16, longint'(a16), longint'(b16), longint'(p16));
      check(24, longint'(a24), longint'(b24), longint'(p24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
