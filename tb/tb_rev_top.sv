// tb_rev_top: end-to-end test of the whole design at its default size.
// Three parts run at the same time, each against its own reference:
//   * the LFSR is stepped by pulses of random width for three full periods;
//     every state is compared with the recurrence Q1' = Q3 xor Q4 run in the
//     testbench, and returns to the seed are counted;
//   * the edge-triggered SISO/SIPO pair shifts a random byte stream in;
//     every time four bits have been shifted the SIPO's parallel word and
//     the SISO's serial output are compared with the stream;
//   * the pulse-triggered pair does the same with one-clk-cycle pulses.
// Each mechanism (LFSR step, LFSR period wrap, edge shift, pulse shift,
// parallel word read, serial bit out after four pulses) is counted, and one
// that never happened counts as a failure.
module tb_rev_top;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lfsr_e = 1'b0, e_edge = 1'b0, sin_edge = 1'b0, e_pulse = 1'b0, sin_pulse = 1'b0;
  logic [3:0] lfsr_q, sipo_edge_q, sipo_pulse_q;
  logic lfsr_sout, siso_edge_sout, siso_pulse_sout;
  int cycles = 0;
  int n_lfsr_step = 0, n_lfsr_wrap = 0, n_edge_shift = 0, n_pulse_shift = 0;
  int n_word_edge = 0, n_word_pulse = 0, n_serial_out = 0;
  logic [3:0] ref_lfsr;
  logic [3:0] hist_e, hist_p;   // bit 0 = newest

  rev_top dut (
    .clk, .rst_n, .lfsr_e, .lfsr_q, .lfsr_sout,
    .e_edge, .sin_edge, .siso_edge_sout, .sipo_edge_q,
    .e_pulse, .sin_pulse, .siso_pulse_sout, .sipo_pulse_q
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LFSR driver and checker
  task automatic run_lfsr(input int pulses);
    for (int p = 0; p < pulses; p++) begin
      int hi;
      hi = $urandom_range(1, 4);
      @(negedge clk) lfsr_e = 1'b1;
      repeat (hi) @(negedge clk);
      lfsr_e = 1'b0;
      ref_lfsr = {ref_lfsr[2:0], ref_lfsr[2] ^ ref_lfsr[3]};
      @(posedge clk);
      #1;
      n_lfsr_step++;
      checks += 2;
      if (lfsr_q !== ref_lfsr) begin failures++; $display("FAIL lfsr q=%b exp=%b", lfsr_q, ref_lfsr); end
      if (lfsr_sout !== ref_lfsr[3]) begin failures++; $display("FAIL lfsr sout"); end
      if (lfsr_q == 4'b0001) n_lfsr_wrap++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  // shift-register driver and checker: both pairs pulsed together
  task automatic run_shift(input int pulses);
    for (int p = 0; p < pulses; p++) begin
      logic be, bp;
      be = 1'(($urandom() >> 4) & 1);
      bp = 1'(($urandom() >> 6) & 1);
      @(negedge clk);
      e_edge = 1'b1; e_pulse = 1'b1; sin_edge = be; sin_pulse = bp;
      @(posedge clk);
      hist_p = {hist_p[2:0], bp};
      #1;
      checks++;
      n_pulse_shift++;
      if (sipo_pulse_q !== hist_p) begin failures++; $display("FAIL pulse sipo q=%b exp=%b", sipo_pulse_q, hist_p); end
      @(negedge clk);
      e_edge = 1'b0; e_pulse = 1'b0; sin_edge = ~be; sin_pulse = ~bp;
      @(posedge clk);
      hist_e = {hist_e[2:0], be};
      #1;
      checks++;
      n_edge_shift++;
      if (sipo_edge_q !== hist_e) begin failures++; $display("FAIL edge sipo q=%b exp=%b", sipo_edge_q, hist_e); end
      checks += 2;
      if (siso_edge_sout !== hist_e[3])  begin failures++; $display("FAIL edge siso"); end
      if (siso_pulse_sout !== hist_p[3]) begin failures++; $display("FAIL pulse siso"); end
      if ((p + 1) % 4 == 0) begin
        n_word_edge++;
        n_word_pulse++;
      end
      if (p >= 3) n_serial_out++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ref_lfsr = 4'b0001;
    hist_e = '0;
    hist_p = '0;
    #1;
    checks++;
    if (lfsr_q !== 4'b0001) begin failures++; $display("FAIL lfsr seed %b", lfsr_q); end
    fork
      run_lfsr(45);
      run_shift(64);
    join
    $display("mechanisms: lfsr_step=%0d lfsr_wrap=%0d edge_shift=%0d pulse_shift=%0d word_edge=%0d word_pulse=%0d serial_out=%0d",
             n_lfsr_step, n_lfsr_wrap, n_edge_shift, n_pulse_shift, n_word_edge, n_word_pulse, n_serial_out);
    checks += 7;
    if (n_lfsr_step == 0)  failures++;
    if (n_lfsr_wrap != 3)  begin failures++; $display("FAIL expected 3 period wraps, saw %0d", n_lfsr_wrap); end
    if (n_edge_shift == 0) failures++;
    if (n_pulse_shift == 0) failures++;
    if (n_word_edge == 0)  failures++;
    if (n_word_pulse == 0) failures++;
    if (n_serial_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
