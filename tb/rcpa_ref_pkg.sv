// rcpa_ref_pkg: reference models for the testbenches, written from the
// arithmetic definition rather than from the gate equations of the RTL.
//
// rcpfa_ref evaluates r = A + B - 2*C(i+1) and maps it onto (S,C) with
// S - C in {-1, 0, +1}: r >= +1 gives (1,0), r <= -1 gives (0,1), r = 0 gives
// (F,F). It also reports whether the cell saturated (|r| = 2) or used the
// forecast (r = 0). rcpa_ref walks a whole reverse carry propagate adder from
// its top bit down, counting those events.
package rcpa_ref_pkg;

  // Forecast types, numbered as in the RTL enum (1, 2, 3).
  function automatic bit forecast_ref(input int typ, input bit a, input bit b);
    case (typ)
      2:       return a & b;
      3:       return a | b;
      default: return a;
    endcase
  endfunction

  // kind: 0 exact non-zero, 1 forecast used, 2 saturated high, 3 saturated low
  function automatic void rcpfa_ref(input bit a, input bit b, input bit cn, input bit f,
                                    output bit s, output bit c, output int kind);
    int r;
    r = int'(a) + int'(b) - 2 * int'(cn);
    if (r > 0)      begin s = 1'b1; c = 1'b0; kind = (r == 2)  ? 2 : 0; end
    else if (r < 0) begin s = 1'b0; c = 1'b1; kind = (r == -2) ? 3 : 0; end
    else            begin s = f;    c = f;    kind = 1; end
  endfunction

  // Result of a width-bit RCPA: bits [width-1:0] sum, bit [width] carry out.
  // n_sat / n_fc count saturated cells and forecast-selected cells.
  function automatic longint unsigned rcpa_ref(input longint unsigned a, input longint unsigned b,
                                               input bit c0, input int width, input int typ,
                                               output int n_sat, output int n_fc);
    bit f [0:64];
    bit cn, s, c;
    int kind;
    longint unsigned res;
    f[0] = c0;
    for (int i = 0; i < width; i++) f[i+1] = forecast_ref(typ, a[i], b[i]);
    cn    = f[width];
    res   = longint'(cn) << width;
    n_sat = 0;
    n_fc  = 0;
    for (int i = width - 1; i >= 0; i--) begin
      rcpfa_ref(a[i], b[i], cn, f[i], s, c, kind);
      res[i] = s;
      if (kind >= 2) n_sat++;
      if (kind == 1) n_fc++;
      cn = c;
    end
    return res;
  endfunction

endpackage
