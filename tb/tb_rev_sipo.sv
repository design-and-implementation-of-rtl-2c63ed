// tb_rev_sipo: checks the serial-in parallel-out register in both forms.
// Edge-triggered instances (N = 4 and N = 6) get pulses of E of random width;
// the parallel output must hold its old value while E is high and show the
// shifted contents exactly one clk cycle after E falls. The pulse-triggered
// instance (N = 4) gets one-clk-cycle pulses and must show the shifted
// contents one clk cycle after each pulse. The expected contents are kept
// as a plain bit queue of the serial inputs.
module tb_rev_sipo;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic e_edge = 1'b0, e_pulse = 1'b0, sin = 1'b0;
  logic [3:0] q4e, q4p;
  logic [5:0] q6e;
  logic [5:0] hist;   // hist[0] = newest serial bit
  int cycles = 0;

  rev_sipo #(.N(4), .TRIG(TRIG_EDGE))  dut4e (.clk(clk), .rst_n(rst_n), .e(e_edge),  .sin(sin), .q(q4e));
  rev_sipo #(.N(6), .TRIG(TRIG_EDGE))  dut6e (.clk(clk), .rst_n(rst_n), .e(e_edge),  .sin(sin), .q(q6e));
  rev_sipo #(.N(4), .TRIG(TRIG_PULSE)) dut4p (.clk(clk), .rst_n(rst_n), .e(e_pulse), .sin(sin), .q(q4p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_edge(input string what, input logic [5:0] h);
    checks += 2;
    if (q4e !== h[3:0]) begin failures++; $display("FAIL %s N=4 edge q=%b exp=%b", what, q4e, h[3:0]); end
    if (q6e !== h)      begin failures++; $display("FAIL %s N=6 edge q=%b exp=%b", what, q6e, h); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check_edge("reset", 6'b0);
    checks++;
    if (q4p !== 4'b0) begin failures++; $display("FAIL reset pulse q=%b", q4p); end
    @(negedge clk) rst_n = 1'b1;

    // edge-triggered: serial bit q[0] is stage 1, the newest bit
    hist = '0;
    for (int p = 0; p < 150; p++) begin
      int hi;
      logic bitv;
      hi = $urandom_range(1, 3);
      bitv = 1'(($urandom() >> 7) & 1);
      for (int k = 0; k < hi; k++) begin
        @(negedge clk);
        e_edge = 1'b1;
        sin = (k == hi - 1) ? bitv : ~bitv;   // only the last value counts
        @(posedge clk);
        #1;
        check_edge("while E high", hist);
      end
      @(negedge clk);
      e_edge = 1'b0;
      sin = $urandom_range(0, 1) != 0;
      hist = {hist[4:0], bitv};
      @(posedge clk);
      #1;
      check_edge("one cycle after E fell", hist);
    end

    // pulse-triggered: one-clk-cycle pulses
    hist = {2'b00, q4p};
    for (int p = 0; p < 150; p++) begin
      logic bitv;
      int gap;
      bitv = 1'(($urandom() >> 9) & 1);
      gap = $urandom_range(1, 3);
      @(negedge clk);
      e_pulse = 1'b1;
      sin = bitv;
      @(posedge clk);
      hist = {hist[4:0], bitv};
      #1;
      checks++;
      if (q4p !== hist[3:0]) begin failures++; $display("FAIL pulse %0d q=%b exp=%b", p, q4p, hist[3:0]); end
      @(negedge clk);
      e_pulse = 1'b0;
      sin = ~bitv;
      repeat (gap) @(posedge clk);
      #1;
      checks++;
      if (q4p !== hist[3:0]) begin failures++; $display("FAIL pulse %0d hold q=%b exp=%b", p, q4p, hist[3:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
