// rca: exact forward ripple-carry adder of WIDTH full_adder cells.
// {cout, sum} = a + b + cin. The carry enters at bit 0 and ripples toward the
// most significant bit, so the delay grows with WIDTH. It is the exact adder
// used inside each group of the carry select adder. Purely combinational.
module rca #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
