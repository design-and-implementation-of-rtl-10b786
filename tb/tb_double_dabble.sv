// tb_double_dabble: self-checking testbench for the binary-to-BCD converter.
// The default 16-bit, 5-digit instance is checked for all 65536 inputs against
// digits obtained by repeated division by ten; a 16-bit instance cut to 4
// digits is checked to give the value modulo 10000 over the same inputs. A
// watchdog ends the run if it ever stalls.
module tb_double_dabble;

  logic [15:0] bin;
  logic [19:0] bcd5;
  logic [15:0] bcd4;

  int checks = 0;
  int failures = 0;

  double_dabble dut5 (.bin(bin), .bcd(bcd5));
  double_dabble #(.BIN_W(16), .DIGITS(4)) dut4 (.bin(bin), .bcd(bcd4));

  function automatic logic [19:0] to_bcd(input int unsigned v);
    logic [19:0] r = '0;
    for (int d = 0; d < 5; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned v = 0; v < 65536; v++) begin
      bin = 16'(v);
      #1;
      checks += 2;
      if (bcd5 != to_bcd(v)) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d -> %h, expected %h", v, bcd5, to_bcd(v));
      end
      if (bcd4 != to_bcd(v % 10000)[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL 4 digits: %0d -> %h", v, bcd4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
