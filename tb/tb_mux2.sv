// tb_mux2: exhaustive self-checking test of the 2:1 multiplexer.
// All eight input combinations are applied; f must equal i1 when sel is 1
// and i0 otherwise. A watchdog ends the run with a failure if it hangs.
module tb_mux2;
  logic i0, i1, sel, f;
  int checks = 0, failures = 0;

  mux2 dut (.i0(i0), .i1(i1), .sel(sel), .f(f));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, i1, i0} = 3'(v);
      #1;
      checks++;
      if (f !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%0b i1=%0b i0=%0b f=%0b", sel, i1, i0, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
