// tb_tg_mux2: exhaustive check of the transmission-gate 2-1 multiplexer.
// The select is always driven with its complement, as in the compressor.
module tb_tg_mux2;
  int checks = 0, failures = 0;
  logic sel, sel_n, a, b, out;

  tg_mux2 dut (.sel(sel), .sel_n(sel_n), .a(a), .b(b), .out(out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {sel, a, b} = 3'(v);
      sel_n = ~sel;
      #1;
      if (sel == 1'b1) exp = a;
      else             exp = b;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL sel=%b a=%b b=%b out=%b", sel, a, b, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
