// hyb_s2p: serial-to-parallel shift register of the hybrid test SerDes.
//
// While `en` is high, each clock shifts `sin` into the top of a W-bit
// register and moves the older bits toward bit 0, so after W shifts the
// first bit received sits in q[0]. It holds the stimulus of the circuit
// under test. That a shift register stores the data during serial-to-parallel
// conversion follows the description of the hybrid SerDes; the bit order and
// the enable are this design's choices.
//
// Timing: q changes at the clock edge of every cycle with en high.
module hyb_s2p #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sin,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {sin, q[W-1:1]};
  end

endmodule
