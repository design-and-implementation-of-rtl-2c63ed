// tb_rev_ms_dff: checks the reversible master-slave D flip-flop.
// E is driven as pulses of random width (1 to 3 clk cycles high, 1 to 3 low)
// and D changes at random on every clk cycle, also while E is high. Expected:
// q takes the value D had at the last clk edge with E = 1, exactly one clk
// cycle after E falls, and stays unchanged while E is high; e_out equals E.
module tb_rev_ms_dff;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, e = 1'b0, d = 1'b0;
  logic q, e_out, q_b, e_out_b;
  logic captured, expq;
  int cycles = 0;

  rev_ms_dff #(.INIT(1'b0)) dut  (.clk(clk), .rst_n(rst_n), .e(e), .d(d), .q(q), .e_out(e_out));
  rev_ms_dff #(.INIT(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .e(e), .d(d), .q(q_b), .e_out(e_out_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock pass-through is combinational
  always @(negedge clk) if (rst_n) begin
    #1;
    checks++;
    if (e_out !== e || e_out_b !== e) begin
      failures++;
      $display("FAIL e_out=%b e=%b", e_out, e);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks += 2;
    if (q !== 1'b0 || q_b !== 1'b1) begin failures++; $display("FAIL reset values %b %b", q, q_b); end
    @(negedge clk) rst_n = 1'b1;
    expq = 1'b0;
    for (int p = 0; p < 200; p++) begin
      int hi, lo;
      hi = $urandom_range(1, 3);
      lo = $urandom_range(1, 3);
      for (int k = 0; k < hi; k++) begin
        @(negedge clk);
        e = 1'b1;
        d = 1'(($urandom() >> 3) & 1);
        @(posedge clk);
        captured = d;
        #1;
        checks++;
        if (q !== expq) begin failures++; $display("FAIL pulse %0d: q changed while E high", p); end
      end
      for (int k = 0; k < lo; k++) begin
        @(negedge clk);
        e = 1'b0;
        d = 1'(($urandom() >> 3) & 1);
        @(posedge clk);
        #1;
        if (k == 0) expq = captured;
        checks++;
        if (q !== expq) begin
          failures++;
          $display("FAIL pulse %0d low cycle %0d: q=%b exp=%b", p, k, q, expq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
