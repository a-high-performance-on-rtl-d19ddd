// tb_afal3: exhaustive self-checking test of the AFAL3 approximate full
// adder. The expected sum and carry of all eight input patterns are
// written out from the cell's truth table (index {a,b,c}); the error
// distance (approximate value 2*carry+sum minus the exact a+b+c) is also
// checked against the table, as is the number of wrong patterns.
module tb_afal3;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0, wrong = 0;

  localparam logic [7:0] EXP_CARRY = 8'b11110000;
  localparam logic [7:0] EXP_SUM   = 8'b10001110;
  localparam int         EXP_ED [8] = '{0, 0, 0, -1, 1, 0, 0, 0};

  afal3 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ed;
      {a, b, c} = 3'(i);
      #1;
      ed = (2 * int'(carry) + int'(sum)) - (int'(a) + int'(b) + int'(c));
      if (ed != 0) wrong++;
      check(carry == EXP_CARRY[i], $sformatf("carry abc=%03b got %0b", i[2:0], carry));
      check(sum == EXP_SUM[i], $sformatf("sum abc=%03b got %0b", i[2:0], sum));
      check(ed == EXP_ED[i], $sformatf("error distance abc=%03b got %0d", i[2:0], ed));
    end
    check(wrong == 2, $sformatf("wrong patterns %0d", wrong));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
