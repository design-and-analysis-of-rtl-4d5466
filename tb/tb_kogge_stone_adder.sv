// tb_kogge_stone_adder: exhaustive self-check of the 4-bit Kogge-Stone adder.
// Every pair of 4-bit operands is applied; sum and carry out are compared
// with the integer sum a + b. The adder has no carry-in (it is 0).
module tb_kogge_stone_adder;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.WIDTH(W)) dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        logic [W:0] ref_sum;
        a = W'(i);
        b = W'(j);
        #1;
        ref_sum = (W+1)'(i + j);
        checks++;
        if ({cout, s} !== ref_sum) begin
          failures++;
          $display("FAIL a=%h b=%h: got cout=%b s=%h, expected %h", a, b, cout, s, ref_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
