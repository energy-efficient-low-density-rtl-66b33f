// rca_tb: checks the ripple-carry adder against the integer sum: a 4-bit
// instance exhaustively and a 16-bit instance on random operands plus the
// full carry ripple cases (all ones plus one).
module rca_tb;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4i, c4o;
  logic [15:0] a16, b16, s16;
  logic        c16i, c16o;

  rca #(.WIDTH(4))  u_r4  (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));
  rca #(.WIDTH(16)) u_r16 (.a(a16), .b(b16), .cin(c16i), .sum(s16), .cout(c16o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    a16 = x; b16 = y; c16i = ci;
    #1;
    checks++;
    if ({c16o, s16} !== 17'({1'b0, x} + {1'b0, y} + ci)) begin
      failures++;
      $display("FAIL rca16 %h + %h + %b = %h", x, y, ci, {c16o, s16});
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4i} = 9'(v);
      #1;
      checks++;
      if ({c4o, s4} !== 5'({1'b0, a4} + {1'b0, b4} + c4i)) begin
        failures++;
        $display("FAIL rca4 %h + %h + %b = %h", a4, b4, c4i, {c4o, s4});
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 2000; n++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
