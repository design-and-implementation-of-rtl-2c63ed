// rev_siso: N-bit reversible serial-in serial-out shift register.
//
// The serial input enters the leftmost stage and every pulse of E moves the
// contents one place to the right; the serial output is the rightmost
// stage, so a bit presented at the input appears at the output after N
// pulses. The stages, and the choice of edge-triggered master-slave
// flip-flops or pulse-triggered latches (TRIG), are those of rev_sipo, of
// which only the last stage is brought out here. Timing as in rev_sipo:
// with TRIG_EDGE the output changes one clk cycle after E falls, with
// TRIG_PULSE one clk cycle after a one-cycle pulse of E rises.
module rev_siso
  import rev_pkg::*;
#(
  parameter int            N    = 4,
  parameter trig_e         TRIG = TRIG_EDGE,
  parameter logic [N-1:0]  INIT = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic sin,
  output logic sout
);

  logic [N-1:0] q_all;

  rev_sipo #(.N(N), .TRIG(TRIG), .INIT(INIT)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .e     (e),
    .sin   (sin),
    .q     (q_all)
  );

  assign sout = q_all[N-1];

  // The inner stages are not outputs of a serial-out register.
  logic unused_ok;
  assign unused_ok = ^q_all;

endmodule
