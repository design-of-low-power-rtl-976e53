// piso_stage: one parallel-to-serial stage of the serializer.
//
// Accepts a W_IN-bit word on `load` and hands it on as W_IN/W_OUT words of
// W_OUT bits, least significant part first, one per `step`. `load` must
// coincide with a `step` (it is the step that starts a new input word), and
// `load` comes once every W_IN/W_OUT steps. In the serializer the stage's
// load is the strobe of the previous stage's step, so this stage samples the
// previous stage's output word at the same edge at which that stage moves on:
// every word is taken exactly once, one input-word period after it appeared.
//
// The published serializer uses a single-phase 2:1 stage (40->20), a
// multiphase shift-register stage (20->4) and differential-flip-flop 2:1
// stages (4->2->1). All of them perform this same word split; here they are
// one register-and-hold structure with different widths, which is this
// design's choice.
//
// Timing: dout changes at the edge ending a `step` cycle and holds for one
// output-word period.
module piso_stage #(
  parameter int unsigned W_IN  = 40,
  parameter int unsigned W_OUT = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             step,
  input  logic [W_IN-1:0]  din,
  output logic [W_OUT-1:0] dout
);

  // Holds the parts of the current input word not yet sent.
  logic [W_IN-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      dout <= '0;
    end else if (load) begin
      dout <= din[W_OUT-1:0];
      hold <= din >> W_OUT;
    end else if (step) begin
      dout <= hold[W_OUT-1:0];
      hold <= hold >> W_OUT;
    end
  end

  initial begin
    if (W_IN % W_OUT != 0 || W_IN <= W_OUT)
      $error("piso_stage: W_IN must be a multiple of W_OUT, larger than it");
  end

  a_load_on_step: assert property (@(posedge clk) disable iff (!rst_n) load |-> step);

endmodule
