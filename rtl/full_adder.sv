// full_adder: one-bit full adder, the basic cell of every adder in the block.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin), as in the original full-adder
// truth table.  Purely combinational; the carry is formed first and the sum
// uses its complement in the transistor-level cell, which has no effect on
// the logic function modelled here.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic carry_n;

  always_comb begin
    carry_n = ~((a & b) | (a & cin) | (b & cin));
    cout    = ~carry_n;
    // Sum from the inverted carry: 1 when all three are 1, or when at least
    // one is 1 and no carry is produced.
    sum     = (a & b & cin) | ((a | b | cin) & carry_n);
  end
endmodule
