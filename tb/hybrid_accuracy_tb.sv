// hybrid_accuracy_tb: accuracy sweep of the hybrid adder over its two knobs,
// the RCPFA cell type (I, II, III) and the number of approximate low bits
// (2, 4, 8) of a 16-bit adder. Every configuration is checked result by
// result against the arithmetic reference, and its mean and largest absolute
// error against the exact sum are printed. Since accuracy is meant to be
// tunable, the mean error of each type must grow with the approximate width,
// and no error may reach beyond twice the weight of the approximate part.
module hybrid_accuracy_tb;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int W     = 16;
  localparam int NRAND = 100000;
  localparam int NAW   = 3;
  localparam int AWS [NAW] = '{2, 4, 8};

  int checks = 0, failures = 0;

  logic [W-1:0] a, b;
  logic         ci;
  logic [W:0]   r [3][NAW];

  for (genvar t = 0; t < 3; t++) begin : g_type
    for (genvar k = 0; k < NAW; k++) begin : g_aw
      hybrid_rcpa_adder #(
        .WIDTH   (W),
        .APPROX_W(AWS[k]),
        .TYPE    (rcpfa_type_e'(t + 1))
      ) dut (.a, .b, .cin(ci), .sum(r[t][k][W-1:0]), .cout(r[t][k][W]));
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real     mean [3][NAW];
    longint  emax [3][NAW];
    longint unsigned esum [3][NAW];
    longint unsigned lo, expv, exact;
    longint  err;
    int      n_sat, n_fc, aw;
    foreach (esum[t, k]) begin esum[t][k] = 0; emax[t][k] = 0; end
    for (int n = 0; n < NRAND; n++) begin
      a = W'($urandom); b = W'($urandom); ci = 1'($urandom);
      #1;
      exact = longint'(a) + longint'(b) + ci;
      for (int t = 0; t < 3; t++) begin
        for (int k = 0; k < NAW; k++) begin
          aw   = AWS[k];
          lo   = rcpa_ref(longint'(a) & ((64'd1 << aw) - 1), longint'(b) & ((64'd1 << aw) - 1),
                          ci, aw, t + 1, n_sat, n_fc);
          expv = (((longint'(a) >> aw) + (longint'(b) >> aw) + lo[aw]) << aw)
                 | (lo & ((64'd1 << aw) - 1));
          checks++;
          if (r[t][k] !== (W + 1)'(expv)) begin
            failures++;
            if (failures < 10)
              $display("FAIL type %0d aw %0d: %h + %h + %b = %h exp %h", t + 1, aw, a, b, ci,
                       r[t][k], expv[W:0]);
          end
          err = longint'(r[t][k]) - longint'(exact);
          if (err < 0) err = -err;
          esum[t][k] += err;
          if (err > emax[t][k]) emax[t][k] = err;
        end
      end
    end
    for (int t = 0; t < 3; t++) begin
      for (int k = 0; k < NAW; k++) begin
        mean[t][k] = real'(esum[t][k]) / NRAND;
        $display("RCPFA type %0d, %0d approximate bits: mean |error| %8.3f, max |error| %0d",
                 t + 1, AWS[k], mean[t][k], emax[t][k]);
        checks++;
        if (emax[t][k] >= (64'd1 << (AWS[k] + 1))) begin
          failures++;
          $display("FAIL error beyond the approximate part");
        end
        if (k > 0) begin
          checks++;
          if (!(mean[t][k] > mean[t][k-1])) begin
            failures++;
            $display("FAIL mean error does not grow with the approximate width");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
