// tb_fredkin_gate: exhaustive check of the Fredkin (controlled swap) gate.
// Outputs are compared with a written-out truth table; the gate must be a
// bijection on its eight input patterns, keep the number of ones, and be its
// own inverse.
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;
  logic [7:0] seen;
  // expected {P,Q,R} for index {A,B,C}: swap B,C when A = 1
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b100, 3'b110, 3'b101, 3'b111};

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c}, {p, q, r}, EXP[i]);
      end
      checks++;
      if ($countones({p, q, r}) != $countones({a, b, c})) begin
        failures++;
        $display("FAIL not conservative for in=%b", {a, b, c});
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", {a, b, c});
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not a bijection, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
