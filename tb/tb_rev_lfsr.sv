// tb_rev_lfsr: checks the reversible LFSR against its known state sequence.
// The 4-bit register (x^4 + x^3 + 1, seed Q1 = 1) must step through the 15
// listed states, one per pulse of E, return to the seed on pulse 15, never
// show the all-zero state, and put out 8 ones and 7 zeros per period on
// sout. Its state must change exactly one clk cycle after E falls and hold
// while E is high. A 3-bit instance (x^3 + x^2 + 1) must run through its 7
// states, and a pulse-triggered 4-bit instance driven with one-clk-cycle
// pulses must follow the same 15-state table, updating one clk cycle after
// each pulse. The sequences were worked out by hand from the recurrence
// Q1' = QN-1 xor QN, Qk' = Qk-1.
module tb_rev_lfsr;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, e = 1'b0;
  logic [3:0] q4;
  logic [2:0] q3;
  logic so4, so3;
  logic e_p = 1'b0;
  logic [3:0] q4p;
  logic so4p;
  int cycles = 0;
  int ones;
  logic [15:0] seen;

  // q[3:0] = {Q4,Q3,Q2,Q1}
  localparam logic [3:0] SEQ4 [16] = '{4'b0001, 4'b0010, 4'b0100, 4'b1001,
                                       4'b0011, 4'b0110, 4'b1101, 4'b1010,
                                       4'b0101, 4'b1011, 4'b0111, 4'b1111,
                                       4'b1110, 4'b1100, 4'b1000, 4'b0001};
  localparam logic [2:0] SEQ3 [8] = '{3'b001, 3'b010, 3'b101, 3'b011,
                                      3'b111, 3'b110, 3'b100, 3'b001};

  rev_lfsr dut4 (.clk(clk), .rst_n(rst_n), .e(e), .q(q4), .sout(so4));
  rev_lfsr #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .e(e), .q(q3), .sout(so3));
  rev_lfsr #(.TRIG(rev_pkg::TRIG_PULSE)) dut4p (.clk(clk), .rst_n(rst_n), .e(e_p), .q(q4p), .sout(so4p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1;
    checks += 2;
    if (q4 !== SEQ4[0]) begin failures++; $display("FAIL seed %b", q4); end
    if (q3 !== SEQ3[0]) begin failures++; $display("FAIL seed3 %b", q3); end
    ones = 0;
    seen = '0;
    for (int p = 1; p <= 45; p++) begin
      int hi;
      hi = $urandom_range(1, 3);
      @(negedge clk) e = 1'b1;
      repeat (hi) begin
        @(posedge clk);
        #1;
        checks++;
        if (q4 !== SEQ4[(p - 1) % 15]) begin failures++; $display("FAIL pulse %0d: state moved while E high", p); end
      end
      @(negedge clk) e = 1'b0;
      @(posedge clk);
      #1;
      checks += 4;
      if (q4 !== SEQ4[p % 15]) begin failures++; $display("FAIL pulse %0d q=%b exp=%b", p, q4, SEQ4[p % 15]); end
      if (so4 !== q4[3])       begin failures++; $display("FAIL sout pulse %0d", p); end
      if (q3 !== SEQ3[p % 7])  begin failures++; $display("FAIL 3-bit pulse %0d q=%b exp=%b", p, q3, SEQ3[p % 7]); end
      if (q4 == 4'b0)          begin failures++; $display("FAIL all-zero state"); end
      if (p <= 15) begin
        ones += int'(so4);
        seen[q4] = 1'b1;
      end
      @(negedge clk);   // one more low cycle
    end
    // pulse-triggered instance, one-clk-cycle pulses
    checks++;
    if (q4p !== SEQ4[0]) begin failures++; $display("FAIL pulse-form seed %b", q4p); end
    for (int p = 1; p <= 30; p++) begin
      @(negedge clk) e_p = 1'b1;
      @(posedge clk);
      #1;
      checks += 2;
      if (q4p !== SEQ4[p % 15]) begin failures++; $display("FAIL pulse-form %0d q=%b exp=%b", p, q4p, SEQ4[p % 15]); end
      if (so4p !== q4p[3])      begin failures++; $display("FAIL pulse-form sout %0d", p); end
      @(negedge clk) e_p = 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1;
      checks++;
      if (q4p !== SEQ4[p % 15]) begin failures++; $display("FAIL pulse-form hold %0d", p); end
    end
    checks += 3;
    if (ones != 8) begin failures++; $display("FAIL %0d ones per period, expected 8", ones); end
    if (seen != 16'hFFFE) begin failures++; $display("FAIL states visited %b", seen); end
    if (q4 !== SEQ4[0]) begin failures++; $display("FAIL not back at seed after 45 pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
