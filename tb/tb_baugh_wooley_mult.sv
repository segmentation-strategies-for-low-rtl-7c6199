// tb_baugh_wooley_mult: checks the two's complement array multiplier against
// the simulator's own signed multiplication: every pair of 8-bit operands,
// then random and corner operands for the default 16-bit and a 24-bit
// instance (the three multiplier sizes the filter was evaluated at).
module tb_baugh_wooley_mult;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [23:0] a24, b24;
  logic [47:0] p24;

  baugh_wooley_mult #(.W(8))  u8  (.a_i(a8),  .b_i(b8),  .p_o(p8));
  baugh_wooley_mult           u16 (.a_i(a16), .b_i(b16), .p_o(p16));
  baugh_wooley_mult #(.W(24)) u24 (.a_i(a24), .b_i(b24), .p_o(p24));

  function automatic logic [23:0] pick24(int n);
    case (n % 8)
      0: return 24'h800000;
      1: return 24'h7fffff;
      2: return 24'hffffff;
      3: return 24'h000000;
      default: return 24'($urandom);
    endcase
  endfunction

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        #1;
        checks++;
        if ($signed(p8) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d * %0d = %0d", a, b, $signed(p8));
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a24 = pick24(n); b24 = pick24(n / 8 + $urandom % 3);
      a16 = a24[15:0]; b16 = b24[23:8];
      #1;
      checks += 2;
      if ($signed(p16) != $signed(a16) * $signed(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL 16x16 %h * %h = %h", a16, b16, p16);
      end
      if (longint'($signed(p24)) != longint'($signed(a24)) * longint'($signed(b24))) begin
        failures++;
        if (failures < 10) $display("FAIL 24x24 %h * %h = %h", a24, b24, p24);
      end
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
