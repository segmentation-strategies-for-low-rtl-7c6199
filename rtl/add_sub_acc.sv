// add_sub_acc: the adder-subtractor and accumulator that follow the
// multiplier. Each enabled cycle adds one tap's contribution:
//   acc <= (clear ? 0 : acc) +/- prod_i +/- shf_i
// prod_i is the multiplier output (subtracted when prod_sub_i is set, which in
// the mixed-mode datapath is the MSB of the sign-magnitude coefficient) and
// shf_i the shifted sample that realises the power-of-two part of the
// coefficient (subtracted when shf_sub_i is set). Selecting add or subtract
// from the coefficient sign follows the mixed-mode architecture; folding the
// shifter term into the same cycle is this design's choice.
//
// Interface: operands are ACC_W-bit two's complement values, already extended
// by the datapath. clear_i starts a new sum (used on the first tap), en_i
// updates the register at the rising edge. acc_o is registered; active-low
// asynchronous reset clears it.
module add_sub_acc #(
  parameter int unsigned ACC_W = 39
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  input  logic             clear_i,
  input  logic [ACC_W-1:0] prod_i,
  input  logic             prod_sub_i,
  input  logic [ACC_W-1:0] shf_i,
  input  logic             shf_sub_i,
  output logic [ACC_W-1:0] acc_o
);

  logic [ACC_W-1:0] base;
  logic [ACC_W-1:0] after_prod;
  logic [ACC_W-1:0] acc_next;

  assign base       = clear_i ? '0 : acc_o;
  assign after_prod = prod_sub_i ? (base - prod_i) : (base + prod_i);
  assign acc_next   = shf_sub_i ? (after_prod - shf_i) : (after_prod + shf_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_o <= '0;
    else if (en_i) acc_o <= acc_next;
  end

endmodule
