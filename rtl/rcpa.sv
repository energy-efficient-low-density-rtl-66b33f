// rcpa: WIDTH-bit reverse carry propagate adder (approximate).
//
// A chain of rcpfa cells in which the carry runs from the most significant
// bit down to the least significant one, opposite to a ripple-carry adder,
// while the forecast signal F runs upward. Two ends close the chains:
//   * the carry into the top cell, C(WIDTH), is the top cell's own forecast
//     output F(WIDTH); this is also the adder's carry toward higher bits
//     (cout), so cout depends only on the top operand bits;
//   * the forecast into the bottom cell, F(0), is the adder's carry input c0.
// The carry left over at the bottom, C(0), carries weight -1 and is dropped
// (it stays unconnected inside, so lint reports it unused); the adder result
// is {cout, sum}. With every cell exact, a + b = {cout, sum} - C(0), so the
// dropped carry costs at most one unit in the last place. A timing error on the
// carry chain therefore hits low-significance bits last, which is the point
// of the reverse direction. Purely combinational; the critical path runs from
// the top operand bits through the carry chain to sum[0].
// The cell chain and the closing of both ends follow the RCPA definition;
// taking F(WIDTH) as cout, dropping C(0) and the default width of 16 are this
// design's choices.
module rcpa
  import rcpa_pkg::*;
#(
  parameter int          WIDTH = 16,
  parameter rcpfa_type_e TYPE  = RCPFA_I
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,     // carry input, used as F(0)
  output logic [WIDTH-1:0] sum,
  output logic             cout    // C(WIDTH) = F(WIDTH)
);
  logic [WIDTH:0] c;   // c[i] = C(i)
  logic [WIDTH:0] f;   // f[i] = F(i)

  assign f[0]     = c0;
  assign c[WIDTH] = f[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    rcpfa #(.TYPE(TYPE)) u_cell (
      .a    (a[i]),
      .b    (b[i]),
      .c_in (c[i+1]),
      .f_in (f[i]),
      .s    (sum[i]),
      .c_out(c[i]),
      .f_out(f[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
