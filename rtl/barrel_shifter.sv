// barrel_shifter: the shifter that realises the power-of-two part s_k of a
// segmented coefficient. It shifts a W-bit data word left by 0 to W-1 places
// through log2(W) stages of 2:1 multiplexers (stage j shifts by 2^j).
//
// SIGNED = 1 treats the input as two's complement and sign-extends it to the
// output width; SIGNED = 0 treats it as an unsigned magnitude (the
// sign-magnitude datapath shifts only the magnitude). The output is
// 2W-1 bits wide, enough for the largest shift without loss. Maximum shift
// W-1 matches the largest exponent a W-bit coefficient can produce; the
// logarithmic structure is this design's choice. Combinational.
module barrel_shifter #(
  parameter int unsigned W      = 16,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned SW    = $clog2(W),
  localparam int unsigned OW    = 2 * W - 1
) (
  input  logic [W-1:0]  d_i,
  input  logic [SW-1:0] sh_i,
  output logic [OW-1:0] q_o
);

  logic [OW-1:0] stage [SW+1];

  assign stage[0] = SIGNED ? {{(OW - W){d_i[W-1]}}, d_i} : {{(OW - W){1'b0}}, d_i};

  for (genvar j = 0; j < SW; j++) begin : g_stage
    assign stage[j+1] = sh_i[j] ? (stage[j] << (1 << j)) : stage[j];
  end

  assign q_o = stage[SW];

endmodule
