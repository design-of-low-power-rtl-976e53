// serdes_sync: synchronizer of the serializer and deserializer.
//
// The parallel side (the PMA on transmit, the word clock on receive) supplies
// a clock with one period per 40-bit word, Tx/Rx par clk in. This block brings
// that clock into the bit-clock domain through a STAGES-deep flip-flop
// synchronizer, detects its rising edges and, while sync_en is high, emits
// two one-cycle alignment pulses:
//   sync_2p  restarts the word-rate divider counter (positive phase of the
//            /2 clock),
//   sync_2n  follows one bit period later and restarts the half-rate phase
//            flip-flop (negative phase of the /2 clock).
// The names and the role of sync_2p/sync_2n (they enable the dividers and
// shift registers) follow the published architecture; the flip-flop
// synchronizer, the edge detector and the one-bit offset between the two
// pulses are this design's choices.
//
// Timing: a rising edge of par_clk_in that is first seen at bit-clock edge t
// gives sync_2p high in the cycle after edge t+STAGES and sync_2n one cycle
// after that. With sync_en low both pulses stay low and the dividers run free.
module serdes_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic par_clk_in,
  input  logic sync_en,
  output logic sync_2p,
  output logic sync_2n
);

  logic [STAGES-1:0] meta;
  logic              prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta    <= '0;
      prev    <= 1'b0;
      sync_2p <= 1'b0;
      sync_2n <= 1'b0;
    end else begin
      meta    <= {meta[STAGES-2:0], par_clk_in};
      prev    <= meta[STAGES-1];
      sync_2p <= sync_en && meta[STAGES-1] && !prev;
      sync_2n <= sync_2p;
    end
  end

  initial begin
    if (STAGES < 2) $error("serdes_sync: STAGES must be at least 2");
  end

endmodule
