// rev_ms_dff: reversible master-slave D flip-flop (MF-gate master,
// Fredkin-gate slave).
//
// A Feynman gate copies the clock E onto two lines. The master is a
// clock-enabled D latch built on an MF gate (rev_d_latch), transparent while
// E = 1. The slave is a Fredkin gate driven with (A, B, C) = (E, Qm, Qs), so
// its Q output is E'.Qm + E.Qs: it follows the master while E = 0 and holds
// while E = 1. A Feynman gate copies the slave's bit to the output and back to
// the Fredkin gate. The Fredkin gate's P output is E itself, uninverted, and
// is brought out as e_out so that the next flip-flop of a register can be
// clocked from it without a NOT gate; that is the reason the document
// gives for using a Fredkin gate rather than a second MF gate in the slave.
//
// Timing: one pulse of E (high for at least one clk cycle, then low) stores
// the value d had at the last clk edge with E = 1; q shows it one clk cycle
// after E has fallen. While E = 1 the output holds, so a chain of these
// flip-flops has no race. The sampling clock clk closes the two latch loops
// (see rev_d_latch); it, the reset and INIT are this design's choices.
module rev_ms_dff #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic d,
  output logic q,
  output logic e_out
);

  logic e_m, e_s;        // two copies of the clock
  logic qm;              // master latch output
  logic qs_state;        // slave stored bit
  logic qs_fb;           // Feynman copy of the slave bit fed back
  logic qs_next;         // Fredkin Q output: E'.Qm + E.Qs
  logic unused_g_r;      // Fredkin garbage output

  feynman_gate u_fg_clk (
    .a (e),
    .b (1'b0),
    .p (e_m),
    .q (e_s)
  );

  rev_d_latch #(.INIT(INIT)) u_master (
    .clk   (clk),
    .rst_n (rst_n),
    .e     (e_m),
    .d     (d),
    .q     (qm)
  );

  fredkin_gate u_slave (
    .a (e_s),
    .b (qm),
    .c (qs_fb),
    .p (e_out),
    .q (qs_next),
    .r (unused_g_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qs_state <= INIT;
    else        qs_state <= qs_next;
  end

  feynman_gate u_fg_copy (
    .a (qs_state),
    .b (1'b0),
    .p (q),
    .q (qs_fb)
  );

endmodule
