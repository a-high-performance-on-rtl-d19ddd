// tb_and_or_gate: exhaustive check of the AND-OR gate block against the
// OR and AND of its two inputs.
module tb_and_or_gate;
  logic a, b, o_or, o_and;
  int checks = 0, failures = 0;

  and_or_gate dut (.a(a), .b(b), .o_or(o_or), .o_and(o_and));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks += 2;
      if (o_or != (i != 0)) begin failures++; $display("FAIL: Oo for %02b", i[1:0]); end
      if (o_and != (i == 3)) begin failures++; $display("FAIL: Ao for %02b", i[1:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
