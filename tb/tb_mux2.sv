// tb_mux2: self-check of the 2:1 multiplexer bank. Random data on both
// inputs, both select values; the output must equal the selected input.
module tb_mux2;
  localparam int unsigned W = 5;
  logic [W-1:0] d0, d1, y;
  logic         sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(W)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      d0  = W'($urandom);
      d1  = W'($urandom);
      sel = n[0];
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
