// tb_csla16_ksa_bec_fcl: end-to-end self-check of the 16-bit carry select
// adder at its default size (no parameter is overridden).
//
// Applies directed corner cases (all ones with and without carry-in, the
// all-ones operands of the published waveforms, a carry travelling from
// cin through every group), then random operands. Each result is compared
// with the integer sum a + b + cin; every group carry (fast carry logic and
// multiplexed) with the carry out of the corresponding low bits.
//
// It also counts, from the operands, how often each mechanism of the design
// was exercised, and fails if one never was:
//   bec_select     a group above group 0 received a carry of 1, so its
//                  multiplexer picked the BEC (carry-in-1) result
//   bec_overflow   the BEC produced the group carry itself (c0 = 0, c1 = 1)
//   carry_through  such a propagating group received a carry of 1, which
//                  the fast carry logic had to pass across it
//   full_chain     the carry-in travelled through all four groups to cout
module tb_csla16_ksa_bec_fcl;
  localparam int unsigned W  = 16;
  localparam int unsigned GW = 4;
  localparam int unsigned NG = W / GW;

  logic [W-1:0]  a, b, s;
  logic          cin, cout;
  logic [NG-1:0] c_grp, c_sel;

  int checks = 0, failures = 0;
  int n_bec_select = 0, n_bec_overflow = 0, n_carry_through = 0, n_full_chain = 0;

  csla16_ksa_bec_fcl dut (
    .a(a), .b(b), .cin(cin), .s(s), .cout(cout), .c_grp(c_grp), .c_sel(c_sel)
  );

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0]    ref_sum;
    logic [NG-1:0] ref_grp;
    logic          carry_in;
    a   = ta;
    b   = tb_;
    cin = tc;
    #1;
    ref_sum = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    carry_in = tc;
    for (int k = 0; k < int'(NG); k++) begin
      logic [GW:0] gsum;
      logic [GW:0] gsum0;
      gsum0 = {1'b0, ta[k*GW +: GW]} + {1'b0, tb_[k*GW +: GW]};
      gsum  = gsum0 + (GW+1)'(carry_in);
      if (k > 0 && carry_in) n_bec_select++;
      if (!gsum0[GW] && gsum0[GW-1:0] == '1) begin
        n_bec_overflow++;
        if (carry_in) n_carry_through++;
      end
      ref_grp[k] = gsum[GW];
      carry_in   = gsum[GW];
    end
    if ((ta ^ tb_) == '1 && tc) n_full_chain++;
    checks++;
    if ({cout, s} !== ref_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: got %b_%h expected %h", ta, tb_, tc, cout, s, ref_sum);
    end
    checks++;
    if (c_grp !== ref_grp || c_sel !== ref_grp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: c_grp=%b c_sel=%b expected %b",
               ta, tb_, tc, c_grp, c_sel, ref_grp);
    end
  endtask

  initial begin
    // Directed cases, including the all-ones operands with either carry-in.
    apply('1, '1, 1'b0);        // s = FFFE, carry out 1
    apply('1, '1, 1'b1);        // s = FFFF, every group carry 1
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);        // carry from cin through all groups
    apply(16'h0FFF, 16'h0000, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h00F0, 16'h000F, 1'b1);
    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      // Every fourth vector makes b close to ~a, so that long carry chains occur.
      if (n % 4 == 1) rb = ~ra ^ W'(1 << ($urandom % W));
      if (n % 4 == 3) rb = ~ra;
      apply(ra, rb, 1'($urandom));
    end
    $display("mechanisms: bec_select=%0d bec_overflow=%0d carry_through=%0d full_chain=%0d",
             n_bec_select, n_bec_overflow, n_carry_through, n_full_chain);
    if (n_bec_select == 0)    begin failures++; $display("FAIL bec_select never happened"); end
    if (n_bec_overflow == 0)  begin failures++; $display("FAIL bec_overflow never happened"); end
    if (n_carry_through == 0) begin failures++; $display("FAIL carry_through never happened"); end
    if (n_full_chain == 0)    begin failures++; $display("FAIL full_chain never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
