// tb_data_memory: checks the sample store at its default size (89 x 16):
// all words read zero after reset, random writes are read back from a
// shadow copy (including write and read in the same cycle: the read shows
// the old word until the edge), and writes with the enable low change nothing.
module tb_data_memory;

  localparam int N = 89, W = 16, AW = $clog2(N);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [N];

  data_memory u_dut (.clk, .rst_n, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                     .raddr_i(raddr), .rdata_o(rdata));

  always #5 clk = ~clk;

  task automatic check_word(int a);
    raddr = AW'(a);
    #1;
    checks++;
    if (rdata != shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d read %h expected %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < N; i++) shadow[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < N; i++) check_word(i);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = ($urandom % 4) != 0;
      waddr = AW'($urandom % N);
      wdata = W'($urandom);
      raddr = waddr;
      #1;
      checks++;
      if (rdata != shadow[waddr]) begin
        failures++;
        if (failures < 10) $display("FAIL read before write at %0d", waddr);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      check_word(int'($urandom % N));
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < N; i++) check_word(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
