// rev_sipo: N-bit reversible serial-in parallel-out shift register.
//
// N storage stages in a row; stage 1 (q[0]) takes the serial input and each
// later stage takes the bit of the one before it, so every pulse of E moves
// the contents one place to the right and all N stored bits are outputs.
// After N pulses the last N serial bits are held, the first one in q[N-1].
// Each stage output is copied by a Feynman gate with a grounded target: one
// copy to the parallel output, one to the next stage, so no line fans out.
//
// TRIG selects the stage: TRIG_EDGE uses master-slave D flip-flops
// (rev_ms_dff), each clocked by the uninverted clock its predecessor's slave
// passes on; the outputs change one clk cycle after E falls. TRIG_PULSE uses
// clock-enabled D latches (rev_d_latch) whose enables are Feynman copies of
// E; a pulse of E exactly one clk cycle wide shifts once and the outputs
// change one clk cycle after E rises. The structure follows the document;
// the sampling clock clk, the reset and the reset value INIT (bit 0 = stage
// 1) are this design's choices.
module rev_sipo
  import rev_pkg::*;
#(
  parameter int            N    = 4,
  parameter trig_e         TRIG = TRIG_EDGE,
  parameter logic [N-1:0]  INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         e,
  input  logic         sin,
  output logic [N-1:0] q
);

  logic [N:0]   e_line;   // clock handed from stage to stage
  logic [N:0]   d_line;   // data handed from stage to stage
  logic [N-1:0] q_stage;  // stage outputs before the copy gates

  assign e_line[0] = e;
  assign d_line[0] = sin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (TRIG == TRIG_EDGE) begin : g_edge
      rev_ms_dff #(.INIT(INIT[i])) u_ff (
        .clk   (clk),
        .rst_n (rst_n),
        .e     (e_line[i]),
        .d     (d_line[i]),
        .q     (q_stage[i]),
        .e_out (e_line[i+1])
      );
    end else begin : g_pulse
      logic e_here;
      feynman_gate u_fg_clk (
        .a (e_line[i]),
        .b (1'b0),
        .p (e_here),
        .q (e_line[i+1])
      );
      rev_d_latch #(.INIT(INIT[i])) u_latch (
        .clk   (clk),
        .rst_n (rst_n),
        .e     (e_here),
        .d     (d_line[i]),
        .q     (q_stage[i])
      );
    end

    feynman_gate u_fg_copy (
      .a (q_stage[i]),
      .b (1'b0),
      .p (q[i]),
      .q (d_line[i+1])
    );
  end

  // The clock and data lines leaving the last stage are garbage outputs.
  logic unused_ok;
  assign unused_ok = ^{e_line[N], d_line[N]};

  if (N < 1) begin : g_bad_n
    $error("rev_sipo: N must be at least 1");
  end

endmodule
