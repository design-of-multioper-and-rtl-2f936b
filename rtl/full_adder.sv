// full_adder: one-bit 3:2 counter.
//
// Adds three bits of equal weight into a sum bit (weight 1) and a carry bit
// (weight 2): a + b + c = s + 2*co. It is the cell of every carry-save row in
// this design. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end

endmodule
