// hybrid_rcpa_adder_tb: end-to-end test of the hybrid adder at its default
// parameters (16 bits, 4 approximate bits, cell type I).
//
// The expected result is built independently: the low bits from the
// arithmetic RCPA reference, whose carry out feeds an exact integer addition
// of the high bits. Directed cases and random operands are applied. The test
// counts each mechanism of the design and fails if one never occurred:
//   - an RCPA cell saturating (A+B-2C = +2 or -2),
//   - an RCPA cell choosing its outputs with the forecast (A+B-2C = 0),
//   - the RCPA forecast carrying 1 into the exact part,
//   - a carry select group taking the BEC path and the plain path,
//   - results equal to and different from the exact sum.
// Error statistics (mean and largest absolute error) are printed.
module hybrid_rcpa_adder_tb;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int W  = 16;
  localparam int AW = 4;
  localparam int EW = W - AW;
  localparam int NG = csla_num_groups(EW);
  localparam int NRAND = 2000000;

  int checks = 0, failures = 0;
  int ev_sat = 0, ev_fc = 0, ev_fcarry = 0, ev_exact = 0, ev_inexact = 0;
  int sel_bec [NG];
  int sel_rca [NG];
  longint unsigned err_sum = 0;
  longint          err_max = 0;
  int              n_ops = 0;

  logic [W-1:0] a, b, s;
  logic         ci, co;

  hybrid_rcpa_adder dut (.a, .b, .cin(ci), .sum(s), .cout(co));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    longint unsigned lo, hi_a, hi_b, hi, expv, exact, low;
    longint          err;
    int n_sat, n_fc, lsb;
    bit fcarry;
    a = x; b = y; ci = c;
    #1;
    lo     = rcpa_ref(longint'(x[AW-1:0]), longint'(y[AW-1:0]), c, AW, 1, n_sat, n_fc);
    fcarry = lo[AW];
    hi_a   = longint'(x[W-1:AW]);
    hi_b   = longint'(y[W-1:AW]);
    hi     = hi_a + hi_b + fcarry;
    expv   = (hi << AW) | (lo & ((64'd1 << AW) - 1));
    checks++;
    if ({co, s} !== (W + 1)'(expv)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b: got %h exp %h", x, y, c, {co, s}, expv[W:0]);
    end
    ev_sat += n_sat;
    ev_fc  += n_fc;
    if (fcarry) ev_fcarry++;
    for (int g = 1; g < NG; g++) begin
      lsb = csla_group_lsb(g);
      low = (hi_a & ((64'd1 << lsb) - 1)) + (hi_b & ((64'd1 << lsb) - 1)) + fcarry;
      if (low[lsb]) sel_bec[g]++;
      else          sel_rca[g]++;
    end
    exact = longint'(x) + longint'(y) + c;
    err   = longint'({co, s}) - longint'(exact);
    if (err == 0) ev_exact++;
    else          ev_inexact++;
    if (err < 0) err = -err;
    err_sum += err;
    if (err > err_max) err_max = err;
    n_ops++;
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("  %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (sel_bec[g]) begin sel_bec[g] = 0; sel_rca[g] = 0; end
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply(16'h0008, 16'h0008, 1'b0);   // forecast carry 1, exact part ripples
    apply(16'hFFF8, 16'h0008, 1'b0);
    apply(16'h000F, 16'h0001, 1'b0);
    for (int n = 0; n < NRAND; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("hybrid_rcpa_adder_tb: %0d operations, mean |error| %0.3f, max |error| %0d",
             n_ops, real'(err_sum) / n_ops, err_max);
    need("RCPA cells saturated", ev_sat);
    need("RCPA cells resolved by forecast", ev_fc);
    need("forecast carry into exact part", ev_fcarry);
    need("results equal to the exact sum", ev_exact);
    need("results off the exact sum", ev_inexact);
    for (int g = 1; g < NG; g++) begin
      need($sformatf("CSLA group %0d took BEC path", g), sel_bec[g]);
      need($sformatf("CSLA group %0d took plain path", g), sel_rca[g]);
    end
    // The error is confined to the approximate part: below 2^(AW+1).
    checks++;
    if (err_max >= (64'd1 << (AW + 1))) begin
      failures++;
      $display("FAIL error %0d reaches beyond the approximate part", err_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
