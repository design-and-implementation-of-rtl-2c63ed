// tb_mf_gate: exhaustive check of the modified Fredkin (MF) gate.
// Outputs are compared with a written-out truth table of
// (P, Q, R) = (A', A'B + AC, AB + A'C); the gate must be a bijection on its
// eight input patterns; and, driven as (E, Q, D), its Q output must be the
// latch equation D.E + E'.Q.
module tb_mf_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  localparam logic [2:0] EXP [8] = '{3'b100, 3'b101, 3'b110, 3'b111,
                                     3'b000, 3'b010, 3'b001, 3'b011};

  mf_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      // latch reading: a = E, b = Q, c = D
      checks++;
      if (q !== ((c & a) | (b & ~a))) begin
        failures++;
        $display("FAIL latch equation E=%b Q=%b D=%b -> %b", a, b, c, q);
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
