// bec: binary to excess-1 converter, x = b + 1 modulo 2^WIDTH.
// Bit 0 is inverted and every higher bit is toggled when all bits below it
// are one: x[0] = ~b[0], x[i] = b[i] ^ (b[0] & ... & b[i-1]). For WIDTH = 4
// these are the four equations of the classic 4-bit BEC (1111 wraps to 0000).
// Wider converters, as used by the carry select adder, extend the same rule.
// Purely combinational, no carry output (the wrap is the modulo behaviour).
module bec #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  always_comb begin
    logic ones_below;   // b[0] & ... & b[i-1]
    ones_below = 1'b1;
    for (int i = 0; i < WIDTH; i++) begin
      x[i]       = b[i] ^ ones_below;
      ones_below = ones_below & b[i];
    end
  end
endmodule
