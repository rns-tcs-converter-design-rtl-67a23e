// csa: W-bit 3:2 carry-save adder.
//
// Reduces three operands to a sum vector and a carry vector whose ordinary
// sum equals a + b + c modulo 2^W: sum = a ^ b ^ c, carry = majority(a,b,c)
// shifted one place left (the carry out of the top bit is dropped, which is
// what two's-complement arithmetic at width W needs). There is no carry
// propagation, so its delay is one full-adder cell regardless of W.
// Purely combinational.
// The converter uses it to fold -M into the modulo-M addition.
module csa #(
  parameter int unsigned W = 39
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  logic [W-2:0] maj;   // majority of the low W-1 bit positions

  always_comb begin
    sum_o   = a_i ^ b_i ^ c_i;
    maj     = (a_i[W-2:0] & b_i[W-2:0]) | (a_i[W-2:0] & c_i[W-2:0]) |
              (b_i[W-2:0] & c_i[W-2:0]);
    carry_o = {maj, 1'b0};
  end

endmodule
