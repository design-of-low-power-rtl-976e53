// sipo_stage: one serial-to-parallel stage of the deserializer.
//
// Collects W_OUT/W_IN words of W_IN bits, one per `step`, and on `load`
// publishes them as one W_OUT-bit word with the earliest word in the least
// significant position. `load` must coincide with a `step` (the word taken
// on that step is the last, most significant part) and comes once every
// W_OUT/W_IN steps. In the deserializer a stage's step is the previous
// stage's load strobe, so each published word of the previous stage is
// taken exactly once, one of its periods after it appeared.
//
// The published deserializer is a chain of binary stages 1->2->4->8 followed
// by an 8->40 stage; the shift-register form of every stage is this design's
// choice.
//
// Timing: dout changes only at the edge ending a `load` cycle.
module sipo_stage #(
  parameter int unsigned W_IN  = 8,
  parameter int unsigned W_OUT = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             load,
  input  logic [W_IN-1:0]  din,
  output logic [W_OUT-1:0] dout
);

  // The words already collected; the next step completes a word.
  logic [W_OUT-W_IN-1:0] acc;
  logic [W_OUT-1:0]      acc_nx;

  // New word enters at the top; older words move toward bit 0.
  assign acc_nx = {din, acc};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      dout <= '0;
    end else if (step) begin
      acc <= acc_nx[W_OUT-1:W_IN];
      if (load) dout <= acc_nx;
    end
  end

  initial begin
    if (W_OUT % W_IN != 0 || W_OUT <= W_IN)
      $error("sipo_stage: W_OUT must be a multiple of W_IN, larger than it");
  end

  a_load_on_step: assert property (@(posedge clk) disable iff (!rst_n) load |-> step);

endmodule
