// sqrt_csla_bec_tb: checks the square-root carry select adder against the
// integer sum. The default 16-bit instance gets directed carry-ripple cases
// and random operands; an 8-bit instance is checked exhaustively. For the
// 16-bit adder it counts, per group, how often the carry into the group was 1
// (BEC output selected) and 0 (plain ripple result selected), and fails if a
// group never saw either.
module sqrt_csla_bec_tb;
  import rcpa_pkg::*;

  localparam int W  = 16;
  localparam int NG = csla_num_groups(W);

  int checks = 0, failures = 0;
  int sel_bec [NG];
  int sel_rca [NG];

  logic [W-1:0] a, b, s;
  logic         ci, co;
  logic [7:0]   a8, b8, s8;
  logic         ci8, co8;

  sqrt_csla_bec #(.WIDTH(W)) dut   (.a, .b, .cin(ci), .sum(s), .cout(co));
  sqrt_csla_bec #(.WIDTH(8)) dut8  (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    int lsb;
    longint unsigned low;
    a = x; b = y; ci = c;
    #1;
    checks++;
    if ({co, s} !== (W + 1)'({1'b0, x} + {1'b0, y} + c)) begin
      failures++;
      $display("FAIL csla16 %h + %h + %b = %h", x, y, c, {co, s});
    end
    for (int g = 1; g < NG; g++) begin
      lsb = csla_group_lsb(g);
      low = (longint'(x) & ((64'd1 << lsb) - 1)) + (longint'(y) & ((64'd1 << lsb) - 1)) + c;
      if (low[lsb]) sel_bec[g]++;
      else          sel_rca[g]++;
    end
  endtask

  initial begin
    foreach (sel_bec[g]) begin sel_bec[g] = 0; sel_rca[g] = 0; end
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('1, 16'h0001, 1'b0);
    check(16'h7FFF, 16'h0001, 1'b0);
    check('0, '0, 1'b0);
    for (int n = 0; n < 20000; n++) check(W'($urandom), W'($urandom), 1'($urandom));
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, ci8} = 17'(v);
      #1;
      checks++;
      if ({co8, s8} !== 9'({1'b0, a8} + {1'b0, b8} + ci8)) begin
        failures++;
        if (failures < 10) $display("FAIL csla8 %h + %h + %b = %h", a8, b8, ci8, {co8, s8});
      end
    end
    for (int g = 1; g < NG; g++) begin
      $display("group %0d (bits %0d..%0d): BEC path %0d, plain path %0d", g,
               csla_group_lsb(g), csla_group_lsb(g) + csla_group_size(g, W) - 1,
               sel_bec[g], sel_rca[g]);
      checks++;
      if (sel_bec[g] == 0 || sel_rca[g] == 0) begin
        failures++;
        $display("FAIL group %0d did not use both paths", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
