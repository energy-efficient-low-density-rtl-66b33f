// rcpfa_tb: exhaustive test of the three reverse carry propagate full-adder
// cell types. For each of the 16 input combinations the sum, the carry toward
// the less significant bit and the forecast output are compared with the
// arithmetic reference. It also checks that the cell is exact (S - C equals
// A + B - 2*C(i+1)) in every case but the two saturating ones.
module rcpfa_tb;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  int checks = 0, failures = 0;

  logic a, b, cin, fin;
  logic [2:0] s, c, fo;

  rcpfa #(.TYPE(RCPFA_I))   u_t1 (.a, .b, .c_in(cin), .f_in(fin), .s(s[0]), .c_out(c[0]), .f_out(fo[0]));
  rcpfa #(.TYPE(RCPFA_II))  u_t2 (.a, .b, .c_in(cin), .f_in(fin), .s(s[1]), .c_out(c[1]), .f_out(fo[1]));
  rcpfa #(.TYPE(RCPFA_III)) u_t3 (.a, .b, .c_in(cin), .f_in(fin), .s(s[2]), .c_out(c[2]), .f_out(fo[2]));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit es, ec;
    int kind, n_exact;
    n_exact = 0;
    for (int v = 0; v < 16; v++) begin
      {a, b, cin, fin} = 4'(v);
      #1;
      rcpfa_ref(a, b, cin, fin, es, ec, kind);
      for (int t = 0; t < 3; t++) begin
        checks++;
        if (s[t] !== es || c[t] !== ec || fo[t] !== forecast_ref(t + 1, a, b)) begin
          failures++;
          $display("FAIL type %0d a=%b b=%b cin=%b f=%b: s=%b c=%b fo=%b exp s=%b c=%b",
                   t + 1, a, b, cin, fin, s[t], c[t], fo[t], es, ec);
        end
        if (kind < 2) begin
          checks++;
          n_exact++;
          if (int'(s[t]) - int'(c[t]) != int'(a) + int'(b) - 2 * int'(cin)) begin
            failures++;
            $display("FAIL type %0d not exact for a=%b b=%b cin=%b f=%b", t + 1, a, b, cin, fin);
          end
        end
      end
    end
    // 2 of the 8 (a,b,cin) combinations saturate, for either f and all 3 types
    checks++;
    if (n_exact != 3 * 12) begin
      failures++;
      $display("FAIL %0d exact cases, expected 36", n_exact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
