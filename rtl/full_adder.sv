// full_adder: conventional exact one-bit full adder, 2*cout + s = a + b + cin.
// It is the cell of the forward ripple-carry adders inside the carry select
// adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
