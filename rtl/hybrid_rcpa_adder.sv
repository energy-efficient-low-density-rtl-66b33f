// hybrid_rcpa_adder: hybrid adder of tunable accuracy.
//
// The APPROX_W least significant bits are added by an approximate reverse
// carry propagate adder (rcpa, cell type TYPE); the remaining WIDTH-APPROX_W
// bits by an exact square-root carry select adder with BEC (sqrt_csla_bec).
// The carry the RCPA hands upward is the forecast output of its top cell,
// which becomes the carry input of the exact part. The adder's own carry
// input drives the forecast input of the lowest RCPA cell.
// Errors therefore stay in, or just above, the low APPROX_W bits: more
// approximate bits trade accuracy for a shorter, cheaper low part.
// Combining an RCPA with an exact forward adder, and using the modified
// square-root carry select adder for the exact part, follows the design; the
// split (APPROX_W = 4 of 16 bits) and the default cell type are this design's
// choices. Purely combinational: {cout, sum} is valid one adder delay after
// the inputs change.
module hybrid_rcpa_adder
  import rcpa_pkg::*;
#(
  parameter int          WIDTH    = 16,
  parameter int          APPROX_W = 4,
  parameter rcpfa_type_e TYPE     = RCPFA_I
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int EXACT_W = WIDTH - APPROX_W;

  if (APPROX_W < 1 || EXACT_W < 1) begin : g_bad_split
    $error("hybrid_rcpa_adder: APPROX_W must be between 1 and WIDTH-1");
  end

  logic lo_carry;   // forecast carry from the approximate part

  rcpa #(
    .WIDTH(APPROX_W),
    .TYPE (TYPE)
  ) u_lo (
    .a    (a[APPROX_W-1:0]),
    .b    (b[APPROX_W-1:0]),
    .c0   (cin),
    .sum  (sum[APPROX_W-1:0]),
    .cout (lo_carry)
  );

  sqrt_csla_bec #(
    .WIDTH(EXACT_W)
  ) u_hi (
    .a   (a[WIDTH-1:APPROX_W]),
    .b   (b[WIDTH-1:APPROX_W]),
    .cin (lo_carry),
    .sum (sum[WIDTH-1:APPROX_W]),
    .cout(cout)
  );
endmodule
