// rcpa_tb: exhaustive test of an 8-bit reverse carry propagate adder for all
// three cell types (all operand pairs, both carry inputs), against the
// bit-by-bit arithmetic reference. It also checks the carry out: it must be
// the forecast of the top cell, i.e. A[7], A[7]&B[7] or A[7]|B[7].
module rcpa_tb;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int W = 8;

  int checks = 0, failures = 0;

  logic [W-1:0] a, b;
  logic         c0;
  logic [W-1:0] s [3];
  logic [2:0]   co;

  rcpa #(.WIDTH(W), .TYPE(RCPFA_I))   u_t1 (.a, .b, .c0, .sum(s[0]), .cout(co[0]));
  rcpa #(.WIDTH(W), .TYPE(RCPFA_II))  u_t2 (.a, .b, .c0, .sum(s[1]), .cout(co[1]));
  rcpa #(.WIDTH(W), .TYPE(RCPFA_III)) u_t3 (.a, .b, .c0, .sum(s[2]), .cout(co[2]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp_r;
    int n_sat, n_fc, n_exact_sum;
    n_exact_sum = 0;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {a, b, c0} = (2 * W + 1)'(v);
      #1;
      for (int t = 0; t < 3; t++) begin
        exp_r = rcpa_ref(longint'(a), longint'(b), c0, W, t + 1, n_sat, n_fc);
        checks++;
        if ({co[t], s[t]} !== (W + 1)'(exp_r)) begin
          failures++;
          if (failures < 10)
            $display("FAIL type %0d a=%h b=%h c0=%b: got %h exp %h",
                     t + 1, a, b, c0, {co[t], s[t]}, exp_r[W:0]);
        end
        checks++;
        if (co[t] !== forecast_ref(t + 1, a[W-1], b[W-1])) begin
          failures++;
          if (failures < 10) $display("FAIL type %0d carry out is not the top forecast", t + 1);
        end
        if ({co[t], s[t]} == (W + 1)'({1'b0, a} + {1'b0, b} + c0)) n_exact_sum++;
      end
    end
    $display("rcpa_tb: %0d of %0d results equal the exact sum", n_exact_sum, 3 * (1 << (2 * W + 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
