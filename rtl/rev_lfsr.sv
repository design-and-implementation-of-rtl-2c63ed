// rev_lfsr: reversible N-bit linear feedback shift register (default 4 bits).
//
// A chain of N master-slave D flip-flops (rev_sipo, edge-triggered) whose
// first stage Q1 is fed with QN-1 xor QN, the exclusive-OR taken by a Feynman
// gate; further Feynman gates copy QN-1 and QN so that no line fans out. Each
// pulse of E shifts once: Q1 <= QN-1 ^ QN, Qk <= Qk-1. For N = 4 this is the
// feedback polynomial x^4 + x^3 + 1, which is primitive, so the register
// runs through all 2^4 - 1 = 15 non-zero states before repeating. The
// all-zero state is a fixed point and must never be loaded, so the reset
// value SEED must be non-zero. The structure follows the document; the two
// tap positions, the seed and its loading by reset are this design's choices.
// TRIG = TRIG_PULSE builds the same register from single D latches (the
// pulse-triggered form); each pulse of E must then be exactly one clk cycle
// wide, and q changes one clk cycle after E rises.
// Only N whose x^N + x^(N-1) + 1 is primitive (2, 3, 4, 6, 7, 15, ...)
// give the full 2^N - 1 period.
//
// Ports: q[k-1] is Qk; sout is QN, the serial output stream. Timing: q
// changes one clk cycle after each falling edge of E (see rev_ms_dff) with
// the default master-slave stages.
module rev_lfsr
  import rev_pkg::*;
#(
  parameter int           N    = 4,
  parameter logic [N-1:0] SEED = 1,          // Q1 = 1, the rest 0
  parameter trig_e        TRIG = TRIG_EDGE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         e,
  output logic [N-1:0] q,
  output logic         sout
);

  logic [N-1:0] q_chain;   // stage outputs from the register
  logic         fb;        // QN-1 xor QN, into Q1
  logic         qn_copy;   // copy of QN for the XOR
  logic         qn1_copy;  // copy of QN-1 for the XOR
  logic         g_xor_p;   // garbage output of the XOR gate

  rev_sipo #(.N(N), .TRIG(TRIG), .INIT(SEED)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .e     (e),
    .sin   (fb),
    .q     (q_chain)
  );

  // Copy QN: one line to the serial output, one to the feedback XOR.
  feynman_gate u_fg_qn (
    .a (q_chain[N-1]),
    .b (1'b0),
    .p (sout),
    .q (qn_copy)
  );

  // Copy QN-1: one line to the parallel output, one to the feedback XOR.
  feynman_gate u_fg_qn1 (
    .a (q_chain[N-2]),
    .b (1'b0),
    .p (q[N-2]),
    .q (qn1_copy)
  );

  // Feedback: Q = QN xor QN-1.
  feynman_gate u_fg_xor (
    .a (qn_copy),
    .b (qn1_copy),
    .p (g_xor_p),
    .q (fb)
  );

  assign q[N-1] = g_xor_p;   // the XOR gate's P output is QN itself
  if (N > 2) begin : g_rest
    assign q[N-3:0] = q_chain[N-3:0];
  end

  if (N < 2) begin : g_bad_n
    $error("rev_lfsr: N must be at least 2");
  end
  if (SEED == '0) begin : g_bad_seed
    $error("rev_lfsr: an all-zero SEED locks the register at zero");
  end

  // A correctly seeded register never reaches the all-zero state.
  a_never_zero : assert property (@(posedge clk) disable iff (!rst_n) q_chain != '0)
    else $error("rev_lfsr: register reached the all-zero state");

endmodule
