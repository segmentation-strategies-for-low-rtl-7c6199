// ripple_adder: N-bit ripple-carry adder made of full-adder cells written as
// XOR, AND and OR gates (sum = a ^ b ^ c, carry = a&b | c&(a^b)). It is the
// row adder of the array multipliers. Carry-in and carry-out are exposed;
// the sum is modulo 2^N. Combinational.
module ripple_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  input  logic         c_i,
  output logic [N-1:0] s_o,
  output logic         c_o
);

  logic [N:0] c;
  assign c[0] = c_i;

  for (genvar k = 0; k < N; k++) begin : g_fa
    logic p;
    assign p      = a_i[k] ^ b_i[k];
    assign s_o[k] = p ^ c[k];
    assign c[k+1] = (a_i[k] & b_i[k]) | (c[k] & p);
  end

  assign c_o = c[N];

endmodule
