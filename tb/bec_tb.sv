// bec_tb: exhaustive test of the binary to excess-1 converter. The 4-bit
// instance is checked against the 16-row function table (b + 1, 1111 wrapping
// to 0000); a 6-bit instance, of the kind the carry select adder uses, is
// checked against b + 1 modulo 64.
module bec_tb;
  int checks = 0, failures = 0;

  logic [3:0] b4, x4;
  logic [5:0] b6, x6;

  bec #(.WIDTH(4)) u_b4 (.b(b4), .x(x4));
  bec #(.WIDTH(6)) u_b6 (.b(b6), .x(x6));

  // Function table of the 4-bit converter, row = input.
  localparam logic [3:0] TABLE [16] = '{
    4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1000,
    4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111, 4'b0000};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v);
      #1;
      checks++;
      if (x4 !== TABLE[v]) begin
        failures++;
        $display("FAIL bec4 b=%b x=%b exp %b", b4, x4, TABLE[v]);
      end
    end
    for (int v = 0; v < 64; v++) begin
      b6 = 6'(v);
      #1;
      checks++;
      if (x6 !== 6'(v + 1)) begin
        failures++;
        $display("FAIL bec6 b=%b x=%b", b6, x6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
