// tb_add_sub_acc: checks the adder-subtractor/accumulator with random
// operands at the default 39-bit width: every combination of add and
// subtract for both terms, restarts with clear, and cycles with the enable
// low (the sum must hold). The expected sum is kept in a 64-bit model.
module tb_add_sub_acc;

  localparam int ACC_W = 39;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en, clr, ps, ss;
  logic [ACC_W-1:0] prod, shf, acc;
  longint model;

  add_sub_acc u_dut (.clk, .rst_n, .en_i(en), .clear_i(clr), .prod_i(prod),
                     .prod_sub_i(ps), .shf_i(shf), .shf_sub_i(ss), .acc_o(acc));

  always #5 clk = ~clk;

  function automatic longint sx(logic [ACC_W-1:0] v);
    return longint'($signed(v));
  endfunction

  initial begin
    en = 0; clr = 0; ps = 0; ss = 0; prod = 0; shf = 0;
    model = 0;
    #12 rst_n = 1;
    checks++;
    if (acc != '0) begin failures++; $display("FAIL not cleared by reset"); end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en   = ($urandom % 5) != 0;
      clr  = ($urandom % 10) == 0;
      ps   = $urandom % 2;
      ss   = $urandom % 2;
      prod = ACC_W'($signed(32'($urandom)));
      shf  = ACC_W'($signed(32'($urandom))) <<< ($urandom % 6);
      @(posedge clk);
      if (en) begin
        if (clr) model = 0;
        model = ps ? model - sx(prod) : model + sx(prod);
        model = ss ? model - sx(shf)  : model + sx(shf);
        model = sx(ACC_W'(model));
      end
      #1;
      checks++;
      if (sx(acc) != model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d acc=%0d expected %0d", n, sx(acc), model);
      end
    end
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
