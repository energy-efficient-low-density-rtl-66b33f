// rcpfa: reverse carry propagate full-adder cell (approximate).
//
// An exact full adder satisfies 2*C(i+1) + S(i) = A(i) + B(i) + C(i). Moving
// the carries across gives S(i) - C(i) = A(i) + B(i) - 2*C(i+1): the cell takes
// the carry c_in = C(i+1) from the NEXT MORE significant cell and produces a
// carry c_out = C(i) of the same weight as its sum, which travels on toward
// the less significant cell. (S,C) can only express -1, 0 or +1, so:
//   right side +1 -> (1,0)     right side -1 -> (0,1)
//   right side +2 -> (1,0)     right side -2 -> (0,1)   (inexact, saturated)
//   right side  0 -> (F,F)     the forecast input f_in picks (0,0) or (1,1)
// The gate form used here is S = F&X | Y and C = F&~Y | ~X with
// X = ~C(i+1) | A&B and Y = ~C(i+1) & (A|B), the same for all three types.
// The cell also produces the forecast f_out = F(i+1) for the next more
// significant cell; TYPE selects how:
//   RCPFA_I   : F(i+1) = A(i)
//   RCPFA_II  : F(i+1) = A(i) & B(i)   (generate)
//   RCPFA_III : F(i+1) = A(i) | B(i)   (alive)
// The truth tables and equations follow the RCPFA definition; the transistor
// level AOI/OAI mapping and any don't-care simplification of type III are not
// modelled, only the logic function. Purely combinational.
module rcpfa
  import rcpa_pkg::*;
#(
  parameter rcpfa_type_e TYPE = RCPFA_I
) (
  input  logic a,      // A(i)
  input  logic b,      // B(i)
  input  logic c_in,   // C(i+1), from the more significant neighbour
  input  logic f_in,   // F(i), from the less significant neighbour
  output logic s,      // S(i)
  output logic c_out,  // C(i), to the less significant neighbour
  output logic f_out   // F(i+1), to the more significant neighbour
);
  logic x, y;

  always_comb begin
    x     = ~c_in | (a & b);
    y     = ~c_in & (a | b);
    s     = (f_in & x) | y;
    c_out = (f_in & ~y) | ~x;
    unique case (TYPE)
      RCPFA_II:  f_out = a & b;
      RCPFA_III: f_out = a | b;
      default:   f_out = a;
    endcase
  end
endmodule
