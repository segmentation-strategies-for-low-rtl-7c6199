// tb_barrel_shifter: checks the shifter for every shift amount with random
// and corner data, both as a sign-extending (two's complement) and as a
// magnitude (unsigned) shifter, at the default 16-bit width and at 8 bits.
module tb_barrel_shifter;

  int checks = 0, failures = 0;

  logic [15:0] d16;
  logic [3:0]  sh16;
  logic [30:0] qs16, qu16;
  logic [7:0]  d8;
  logic [2:0]  sh8;
  logic [14:0] qs8;

  barrel_shifter                          us16 (.d_i(d16), .sh_i(sh16), .q_o(qs16));
  barrel_shifter #(.SIGNED(1'b0))         uu16 (.d_i(d16), .sh_i(sh16), .q_o(qu16));
  barrel_shifter #(.W(8), .SIGNED(1'b1))  us8  (.d_i(d8),  .sh_i(sh8),  .q_o(qs8));

  initial begin
    for (int n = 0; n < 4000; n++) begin
      d16  = (n < 16) ? 16'h8000 : (n < 32) ? 16'hffff : 16'($urandom);
      sh16 = 4'(n);
      d8   = 8'($urandom);
      sh8  = 3'(n);
      #1;
      checks += 3;
      if (longint'($signed(qs16)) != longint'($signed(d16)) * (longint'(1) << sh16)) begin
        failures++; if (failures < 10) $display("FAIL s16 %h << %0d = %h", d16, sh16, qs16);
      end
      if (longint'(qu16) != longint'(d16) * (longint'(1) << sh16)) begin
        failures++; if (failures < 10) $display("FAIL u16 %h << %0d = %h", d16, sh16, qu16);
      end
      if (int'($signed(qs8)) != int'($signed(d8)) * (1 << sh8)) begin
        failures++; if (failures < 10) $display("FAIL s8 %h << %0d = %h", d8, sh8, qs8);
      end
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
