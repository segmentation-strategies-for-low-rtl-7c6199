// baugh_wooley_mult: W x W two's complement array multiplier (Baugh-Wooley).
//
// The partial-product bit a[j]&b[i] is formed by an AND gate; the bits that
// involve exactly one sign bit (a[W-1] or b[W-1], but not both) are inverted
// (NAND), and two constant ones are added at weights 2^W and 2^(2W-1). This
// turns the signed product into a sum of non-negative rows, which an array of
// ripple-carry rows of full adders adds up, one row per multiplier bit.
// The Baugh-Wooley scheme and the gate set (AND, OR, XOR, inverter) are those
// of the multiplier the design was evaluated with; the row-by-row ripple
// array is this design's choice.
//
// Interface: a_i and b_i are signed W-bit operands, p_o the 2W-bit signed
// product. Purely combinational.
module baugh_wooley_mult #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a_i,
  input  logic [W-1:0]   b_i,
  output logic [2*W-1:0] p_o
);

  localparam int unsigned PW = 2 * W;

  logic [PW-1:0] row [W];     // partial-product row i, already at weight 2^i
  logic [PW-1:0] sum [W+1];   // running sum after i rows

  for (genvar i = 0; i < W; i++) begin : g_row
    for (genvar k = 0; k < PW; k++) begin : g_bit
      if (k >= i && k < i + W) begin : g_pp
        localparam int unsigned J = k - i;
        if ((J == W - 1) != (i == W - 1)) begin : g_nand
          assign row[i][k] = ~(a_i[J] & b_i[i]);
        end else begin : g_and
          assign row[i][k] = a_i[J] & b_i[i];
        end
      end else begin : g_zero
        assign row[i][k] = 1'b0;
      end
    end
  end

  // Correction constant 2^W + 2^(2W-1).
  assign sum[0] = (PW'(1) << W) | (PW'(1) << (PW - 1));

  for (genvar i = 0; i < W; i++) begin : g_add
    logic unused_carry;
    ripple_adder #(.N(PW)) u_row (
      .a_i (sum[i]),
      .b_i (row[i]),
      .c_i (1'b0),
      .s_o (sum[i+1]),
      .c_o (unused_carry)
    );
  end

  assign p_o = sum[W];

endmodule
