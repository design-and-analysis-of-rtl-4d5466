// tb_csla_ksa_bec: exhaustive self-check of one 4-bit carry select group.
// For every a, b and cin: {cout, s} = a + b + cin, and the two candidate
// carries c0 = carry of a + b and c1 = carry of a + b + 1 regardless of cin.
module tb_csla_ksa_bec;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, s;
  logic         cin, cout, c0, c1;
  int checks = 0, failures = 0;

  csla_ksa_bec #(.WIDTH(W)) dut (
    .a(a), .b(b), .cin(cin), .s(s), .cout(cout), .c0(c0), .c1(c1)
  );

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
        for (int c = 0; c < 2; c++) begin
          logic [W:0] ref_sum;
          a   = W'(i);
          b   = W'(j);
          cin = c[0];
          #1;
          ref_sum = (W+1)'(i + j + c);
          checks++;
          if ({cout, s} !== ref_sum) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%b: got %b_%h expected %h", a, b, cin, cout, s, ref_sum);
          end
          checks++;
          if (c0 !== ((i + j) >= (1 << W)) || c1 !== ((i + j + 1) >= (1 << W))) begin
            failures++;
            $display("FAIL a=%h b=%h: c0=%b c1=%b", a, b, c0, c1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
