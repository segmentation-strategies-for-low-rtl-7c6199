// data_memory: the filter's sample store, N words of W bits holding the last
// N input samples. The controller writes each new sample over the oldest one
// (circular addressing) and reads the samples of one output back, newest
// first, one per cycle.
//
// Interface: one synchronous write port (we_i, waddr_i, wdata_i, written at
// the rising clock edge) and one asynchronous read port (raddr_i -> rdata_o),
// so a sample written at an edge is readable in the following cycle. An
// active-low reset clears every word, which gives the filter a zero initial
// state. Word count and width come from the filter; the register-file
// organisation and the reset are this design's choices.
module data_memory #(
  parameter int unsigned N  = 89,
  parameter int unsigned W  = 16,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [W-1:0]  rdata_o
);

  logic [W-1:0] mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (we_i && (int'(waddr_i) < N)) begin
      mem[waddr_i] <= wdata_i;
    end
  end

  assign rdata_o = (int'(raddr_i) < N) ? mem[raddr_i] : '0;

endmodule
