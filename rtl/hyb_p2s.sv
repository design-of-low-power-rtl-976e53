// hyb_p2s: parallel-to-serial shift register of the hybrid test SerDes.
//
// `load` copies the W-bit word d into the register; on every other clock the
// register shifts toward bit 0, filling with zeros. sout is bit 0, so the
// word leaves LSB first, one bit per cycle, starting in the cycle after the
// load edge. That a shift register stores the data during parallel-to-serial
// conversion follows the description of the hybrid SerDes; bit order and
// zero fill are this design's choices.
module hyb_p2s #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic         sout
);

  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= d;
    else           sr <= sr >> 1;
  end

  assign sout = sr[0];

endmodule
