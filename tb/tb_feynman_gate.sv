// tb_feynman_gate: exhaustive check of the Feynman (CNOT) gate.
// Every input pair is compared with P = A, Q = A xor B written out as a
// truth table, and applying the gate twice must give back the inputs.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q, p2, q2;
  // expected {P,Q} for index {A,B}: 00->00, 01->01, 10->11, 11->10
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b}, {p, q}, EXP[i]);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", {a, b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
