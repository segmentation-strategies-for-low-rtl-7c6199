// sm_array_mult: W x W sign-magnitude array multiplier.
//
// Each operand is {sign, magnitude[W-2:0]}. The magnitudes go through an
// unsigned array multiplier (AND-gate partial products, one ripple-carry row
// of full adders per multiplier bit) and the product sign is the XOR of the
// operand signs. Because no sign extension takes place, a change of sign
// toggles a single bit, which is what makes this representation attractive
// for low switching activity. The XOR sign and the unsigned array are the
// usual sign-magnitude multiplier; the ripple rows are this design's choice.
// A zero product may come out as "-0" (sign 1, magnitude 0); users of the
// product must treat it as zero.
//
// Interface: a_i, b_i sign-magnitude W bits; p_o = {sign, magnitude} with a
// 2W-2 bit magnitude (2W-1 bits in all). Purely combinational.
module sm_array_mult #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a_i,
  input  logic [W-1:0]   b_i,
  output logic [2*W-2:0] p_o
);

  localparam int unsigned MW = W - 1;       // magnitude width
  localparam int unsigned PW = 2 * MW;      // product magnitude width

  logic [PW-1:0] row [MW];
  logic [PW-1:0] sum [MW+1];

  for (genvar i = 0; i < MW; i++) begin : g_row
    for (genvar k = 0; k < PW; k++) begin : g_bit
      if (k >= i && k < i + MW) begin : g_pp
        assign row[i][k] = a_i[k-i] & b_i[i];
      end else begin : g_zero
        assign row[i][k] = 1'b0;
      end
    end
  end

  assign sum[0] = '0;

  for (genvar i = 0; i < MW; i++) begin : g_add
    logic unused_carry;
    ripple_adder #(.N(PW)) u_row (
      .a_i (sum[i]),
      .b_i (row[i]),
      .c_i (1'b0),
      .s_o (sum[i+1]),
      .c_o (unused_carry)
    );
  end

  assign p_o = {a_i[W-1] ^ b_i[W-1], sum[MW]};

endmodule
