// rev_top: the reversible register library assembled as one design.
//
// Three independent parts share the sampling clock and reset:
//   * the 4-bit reversible LFSR (rev_lfsr), the main design: every pulse of
//     lfsr_e steps it once through its 15-state sequence, lfsr_q is the state
//     Q1..Q4 and lfsr_sout the serial output stream;
//   * an edge-triggered 4-bit SISO and SIPO register pair (master-slave
//     flip-flops), shifting sin_edge in on each pulse of e_edge;
//   * a pulse-triggered 4-bit SISO and SIPO register pair (D latches),
//     shifting sin_pulse in on each one-clk-cycle pulse of e_pulse.
// Timing of each part as in its module: edge-triggered outputs change one
// clk cycle after the fall of their E, pulse-triggered ones one clk cycle
// after the rise. All registers reset to zero, the LFSR to Q1 = 1.
module rev_top
  import rev_pkg::*;
#(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // LFSR
  input  logic         lfsr_e,
  output logic [N-1:0] lfsr_q,
  output logic         lfsr_sout,
  // edge-triggered shift registers
  input  logic         e_edge,
  input  logic         sin_edge,
  output logic         siso_edge_sout,
  output logic [N-1:0] sipo_edge_q,
  // pulse-triggered shift registers
  input  logic         e_pulse,
  input  logic         sin_pulse,
  output logic         siso_pulse_sout,
  output logic [N-1:0] sipo_pulse_q
);

  rev_lfsr #(.N(N)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .e     (lfsr_e),
    .q     (lfsr_q),
    .sout  (lfsr_sout)
  );

  // Feynman gates copy each shared clock and serial input for the two
  // registers that use it.
  logic e_edge_a, e_edge_b, sin_edge_a, sin_edge_b;
  logic e_pulse_a, e_pulse_b, sin_pulse_a, sin_pulse_b;

  feynman_gate u_fg_e_edge    (.a(e_edge),    .b(1'b0), .p(e_edge_a),    .q(e_edge_b));
  feynman_gate u_fg_sin_edge  (.a(sin_edge),  .b(1'b0), .p(sin_edge_a),  .q(sin_edge_b));
  feynman_gate u_fg_e_pulse   (.a(e_pulse),   .b(1'b0), .p(e_pulse_a),   .q(e_pulse_b));
  feynman_gate u_fg_sin_pulse (.a(sin_pulse), .b(1'b0), .p(sin_pulse_a), .q(sin_pulse_b));

  rev_siso #(.N(N), .TRIG(TRIG_EDGE)) u_siso_edge (
    .clk (clk), .rst_n (rst_n), .e (e_edge_a), .sin (sin_edge_a), .sout (siso_edge_sout)
  );

  rev_sipo #(.N(N), .TRIG(TRIG_EDGE)) u_sipo_edge (
    .clk (clk), .rst_n (rst_n), .e (e_edge_b), .sin (sin_edge_b), .q (sipo_edge_q)
  );

  rev_siso #(.N(N), .TRIG(TRIG_PULSE)) u_siso_pulse (
    .clk (clk), .rst_n (rst_n), .e (e_pulse_a), .sin (sin_pulse_a), .sout (siso_pulse_sout)
  );

  rev_sipo #(.N(N), .TRIG(TRIG_PULSE)) u_sipo_pulse (
    .clk (clk), .rst_n (rst_n), .e (e_pulse_b), .sin (sin_pulse_b), .q (sipo_pulse_q)
  );

endmodule
