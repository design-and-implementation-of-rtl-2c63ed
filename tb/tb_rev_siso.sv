// tb_rev_siso: checks the serial-in serial-out register in both forms.
// A random bit stream is shifted through a 4-bit edge-triggered and a 4-bit
// pulse-triggered register; after every pulse the serial output must equal
// the bit that entered N = 4 pulses earlier (0 for the first N pulses, the
// reset contents). A single 1 after a run of 0s must reach the output on
// exactly the 4th pulse, not earlier.
module tb_rev_siso;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic e_edge = 1'b0, e_pulse = 1'b0, sin = 1'b0;
  logic so_e, so_p;
  logic [63:0] stream;
  int cycles = 0;

  rev_siso #(.N(4), .TRIG(TRIG_EDGE))  dut_e (.clk(clk), .rst_n(rst_n), .e(e_edge),  .sin(sin), .sout(so_e));
  rev_siso #(.N(4), .TRIG(TRIG_PULSE)) dut_p (.clk(clk), .rst_n(rst_n), .e(e_pulse), .sin(sin), .sout(so_p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one pulse on both registers: E high for one clk cycle, then low for one
  task automatic shift_in(input logic b);
    @(negedge clk);
    e_edge = 1'b1;
    e_pulse = 1'b1;
    sin = b;
    @(negedge clk);
    e_edge = 1'b0;
    e_pulse = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // latency: a lone 1 after zeros appears on the 4th pulse
    for (int p = 1; p <= 6; p++) begin
      logic expv;
      shift_in(p == 1);
      expv = (p == 4);
      checks += 2;
      if (so_e !== expv) begin failures++; $display("FAIL edge latency pulse %0d sout=%b", p, so_e); end
      if (so_p !== expv) begin failures++; $display("FAIL pulse latency pulse %0d sout=%b", p, so_p); end
    end
    // random stream
    stream = {$urandom(), $urandom()};
    for (int p = 0; p < 64; p++) begin
      logic expv;
      shift_in(stream[p]);
      expv = (p >= 3) ? stream[p-3] : 1'b0;
      checks += 2;
      if (so_e !== expv) begin failures++; $display("FAIL edge stream %0d sout=%b exp=%b", p, so_e, expv); end
      if (so_p !== expv) begin failures++; $display("FAIL pulse stream %0d sout=%b exp=%b", p, so_p, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
