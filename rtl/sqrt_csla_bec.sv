// sqrt_csla_bec: square-root carry select adder with binary to excess-1
// converters (exact). {cout, sum} = a + b + cin.
//
// The operands are cut into groups of growing width (2, 2, 3, 4, 5 for the
// default 16 bits, see rcpa_pkg). Group 0 is a plain ripple-carry adder fed by
// cin. Every other group of k bits holds one k-bit ripple-carry adder with its
// carry input tied to 0, giving the (k+1)-bit result {c0, s0}. Instead of a
// second ripple adder with carry input 1, a (k+1)-bit BEC forms {c0, s0} + 1.
// When the carry out of the group below arrives, a 2:1 multiplexer picks the
// BEC output (carry 1) or the plain result (carry 0), yielding the group's sum
// and its carry out. Growing group widths let each group's local addition
// finish at about the time its select carry arrives.
// The BEC replacement follows the modified carry select adder; the exact
// group widths are this design's choice. Purely combinational.
module sqrt_csla_bec
  import rcpa_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = csla_num_groups(WIDTH);

  logic [NG:0] gc;   // gc[g] = carry into group g

  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LSB = csla_group_lsb(g);
    localparam int K   = csla_group_size(g, WIDTH);

    if (g == 0) begin : g_first
      rca #(.WIDTH(K)) u_rca (
        .a   (a[LSB +: K]),
        .b   (b[LSB +: K]),
        .cin (gc[0]),
        .sum (sum[LSB +: K]),
        .cout(gc[1])
      );
    end else begin : g_sel
      logic [K:0] r0;   // {carry, sum} with carry in 0
      logic [K:0] r1;   // r0 + 1, i.e. the result with carry in 1

      rca #(.WIDTH(K)) u_rca (
        .a   (a[LSB +: K]),
        .b   (b[LSB +: K]),
        .cin (1'b0),
        .sum (r0[K-1:0]),
        .cout(r0[K])
      );

      bec #(.WIDTH(K + 1)) u_bec (
        .b(r0),
        .x(r1)
      );

      assign {gc[g+1], sum[LSB +: K]} = gc[g] ? r1 : r0;
    end
  end

  assign cout = gc[NG];
endmodule
