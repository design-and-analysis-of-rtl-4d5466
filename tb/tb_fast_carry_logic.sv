// tb_fast_carry_logic: exhaustive self-check of the fast carry logic for
// four groups. Reference: the carries rippled group by group,
// carry[k] = c0[k] | (c1[k] & carry[k-1]), with carry[-1] = cin.
module tb_fast_carry_logic;
  localparam int unsigned N = 4;
  logic         cin;
  logic [N-1:0] c0, c1, carry;
  int checks = 0, failures = 0;

  fast_carry_logic #(.N_GROUPS(N)) dut (.cin(cin), .c0(c0), .c1(c1), .carry(carry));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*N+1)); v++) begin
      logic [N-1:0] expected;
      logic         r;
      {cin, c1, c0} = (2*N+1)'(v);
      #1;
      r = cin;
      for (int k = 0; k < int'(N); k++) begin
        r = c0[k] | (c1[k] & r);
        expected[k] = r;
      end
      checks++;
      if (carry !== expected) begin
        failures++;
        $display("FAIL cin=%b c0=%b c1=%b: carry=%b expected %b", cin, c0, c1, carry, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
