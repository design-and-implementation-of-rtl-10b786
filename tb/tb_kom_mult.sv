// tb_kom_mult: self-checking testbench for the combinational Karatsuba-Ofman
// multiplier. The default 8-bit instance is checked against the integer
// product for every one of the 65536 operand pairs; a 13-bit instance (odd
// width, three levels of recursion) is checked with 20000 random pairs and the
// extreme values. A watchdog ends the run if it ever stalls.
module tb_kom_mult;

  localparam int unsigned W2 = 13;

  logic [7:0]     a8, b8;
  logic [15:0]    p8;
  logic [W2-1:0]  a13, b13;
  logic [2*W2-1:0] p13;

  int checks = 0;
  int failures = 0;

  kom_mult dut8 (.a(a8), .b(b8), .p(p8));
  kom_mult #(.W(W2)) dut13 (.a(a13), .b(b13), .p(p13));

  task automatic check13(input logic [W2-1:0] x, input logic [W2-1:0] y);
    longint unsigned exp;
    a13 = x;
    b13 = y;
    #1;
    exp = longint'(x) * longint'(y);
    checks++;
    if (longint'(p13) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL W=13: %0d * %0d = %0d, expected %0d", x, y, p13, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (int'(p8) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL W=8: %0d * %0d = %0d", i, j, p8);
        end
      end
    end
    check13('1, '1);
    check13('1, '0);
    check13('0, '1);
    check13(13'h1000, 13'h1fff);
    for (int k = 0; k < 20000; k++) check13(W2'($urandom), W2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
