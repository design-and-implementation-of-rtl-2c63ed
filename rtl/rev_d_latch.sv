// rev_d_latch: clock-enabled reversible D latch, Q+ = D.E + E'.Q.
//
// An MF gate is driven with (A, B, C) = (E, Q, D); its Q output is the next
// state, D while E = 1 and the held Q while E = 0. A Feynman gate with a
// grounded target copies the stored bit, one copy to the output and one back
// to the MF gate's B input, so no line fans out. The MF gate's P (= E') and
// R outputs are garbage lines.
//
// Timing: the feedback line that closes the latch loop is a register on the
// sampling clock clk, so the latch is transparent on every clk edge at which
// E = 1 (q shows d one clk later) and holds while E = 0. This keeps the
// circuit free of combinational loops; it is this design's choice, as are
// the asynchronous active-low reset and its value INIT.
module rev_d_latch #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic d,
  output logic q
);

  logic state;       // stored bit on the feedback line
  logic q_fb;        // Feynman copy fed back to the MF gate
  logic q_next;      // MF gate Q output: D.E + E'.Q
  logic unused_g_p, unused_g_r;  // garbage outputs of the MF gate

  mf_gate u_mf (
    .a (e),
    .b (q_fb),
    .c (d),
    .p (unused_g_p),
    .q (q_next),
    .r (unused_g_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= INIT;
    else        state <= q_next;
  end

  feynman_gate u_fg_copy (
    .a (state),
    .b (1'b0),
    .p (q),
    .q (q_fb)
  );

endmodule
