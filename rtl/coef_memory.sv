// coef_memory: holds the N segmented coefficients of the filter. Each word
// is {s_zero, s_neg, s_exp, m}: the remainder m_k that goes to the multiplier
// (its MSB is the coefficient sign that steers the adder-subtractor in the
// mixed-mode datapath) and the sign and exponent of the power-of-two part s_k
// that goes to the shifter.
//
// Interface: one synchronous write port (we_i, waddr_i, wdata_i) and one
// asynchronous read port (raddr_i -> rdata_o). There is no reset: the words
// are meaningless until all N coefficients have been loaded. The word layout
// and the register-file organisation are this design's choices.
module coef_memory #(
  parameter int unsigned N  = 89,
  parameter int unsigned CW = 22,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [CW-1:0] wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [CW-1:0] rdata_o
);

  logic [CW-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we_i && (int'(waddr_i) < N)) mem[waddr_i] <= wdata_i;
  end

  assign rdata_o = (int'(raddr_i) < N) ? mem[raddr_i] : '0;

endmodule
