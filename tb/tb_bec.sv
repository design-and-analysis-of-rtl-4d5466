// tb_bec: exhaustive self-check of the Binary to Excess-1 converter at its
// default width of 5 and at 4 bits: x must equal b + 1 modulo 2**WIDTH.
module tb_bec;
  logic [4:0] b5, x5;
  logic [3:0] b4, x4;
  int checks = 0, failures = 0;

  bec dut5 (.b(b5), .x(x5));
  bec #(.WIDTH(4)) dut4 (.b(b4), .x(x4));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      b5 = 5'(i);
      b4 = 4'(i);
      #1;
      checks++;
      if (x5 !== 5'(i + 1)) begin
        failures++;
        $display("FAIL width 5: b=%b x=%b expected %b", b5, x5, 5'(i + 1));
      end
      checks++;
      if (x4 !== 4'(i + 1)) begin
        failures++;
        $display("FAIL width 4: b=%b x=%b expected %b", b4, x4, 4'(i + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
