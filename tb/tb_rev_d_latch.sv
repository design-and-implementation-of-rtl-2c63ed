// tb_rev_d_latch: checks the clock-enabled reversible D latch.
// After reset the two instances hold their INIT values (0 and 1). Then E and
// D are driven at random for 400 clk cycles; the expected output is the value
// D had at the most recent clk edge at which E was 1 (or INIT if E has not
// yet been 1), visible one clk cycle later.
module tb_rev_d_latch;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, e = 1'b0, d = 1'b0;
  logic q0, q1;
  logic exp0, exp1;
  int cycles = 0;

  rev_d_latch #(.INIT(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .e(e), .d(d), .q(q0));
  rev_d_latch #(.INIT(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .e(e), .d(d), .q(q1));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks += 2;
    if (q0 !== 1'b0) begin failures++; $display("FAIL reset value of INIT=0 latch"); end
    if (q1 !== 1'b1) begin failures++; $display("FAIL reset value of INIT=1 latch"); end
    @(negedge clk) rst_n = 1'b1;
    exp0 = 1'b0;
    exp1 = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      e = ($urandom_range(0, 2) == 0);
      d = 1'(($urandom() >> 5) & 1);
      @(posedge clk);
      if (e) begin
        exp0 = d;
        exp1 = d;
      end
      #1;
      checks += 2;
      if (q0 !== exp0 || q1 !== exp1) begin
        failures++;
        $display("FAIL cycle %0d e=%b d=%b q=%b%b exp=%b%b", i, e, d, q0, q1, exp0, exp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
