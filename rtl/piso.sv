// piso: 40-bit serializer (parallel in, serial out).
//
// A 40-bit word from the PMA is taken once per period of tx_par_clk_in and
// sent as 40 consecutive serial bits, bit 0 first, one per bit clock. The
// conversion runs in four stages, 40->20->4->2->1: a 40->20 stage, a 20->4
// shift-register stage and two 2:1 stages at the highest rates. A
// synchronizer turns the rising edges of tx_par_clk_in into the alignment
// pulses sync_2p/sync_2n (while sync_en is high), and these restart the
// dividers that pace every stage. This chain, the signal names and the role
// of the synchronizer follow the published architecture.
//
// This design's own choices: all stages run on the bit clock with clock
// enables (one bit per cycle) instead of separate multi-phase clocks; the
// parallel word is sampled half a word after divider phase 0, so the PMA data
// may change anywhere near the tx_par_clk_in edge; bit order is LSB first.
//
// Timing: the capture edge is the edge ending the cycle in which the divider
// phase is PAR_W/2. Bit i of the captured word is on tx_serial during the
// cycle that follows TX_LATENCY + i edges after the capture edge
// (TX_LATENCY = 46 for the 40-bit chain). The throughput is one word every
// PAR_W cycles. tx_par_clk_out is the /40 clock that the PMA can use as its
// word clock; div_clk carries all divided clocks.
module piso
  import serdes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_par_clk_in,
  input  logic             sync_en,
  input  logic [PAR_W-1:0] tx_data,
  output logic             tx_serial,
  output logic             tx_par_clk_out,
  output divclk_t          div_clk
);

  logic     sync_2p, sync_2n;
  strobes_t stb;

  serdes_sync u_sync (
    .clk, .rst_n, .par_clk_in(tx_par_clk_in), .sync_en, .sync_2p, .sync_2n
  );

  serdes_clkgen u_div (
    .clk, .rst_n, .sync_2p, .sync_2n, .stb, .div_clk
  );

  assign tx_par_clk_out = div_clk.d40;

  // Parallel input register.
  logic [TX_W0-1:0] word_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       word_q <= '0;
    else if (stb.cap) word_q <= tx_data;
  end

  logic [TX_W1-1:0] w20;
  logic [TX_W2-1:0] w4;
  logic [TX_W3-1:0] w2;
  logic [TX_W4-1:0] w1;

  // 40 -> 20, low-speed stage.
  piso_stage #(.W_IN(TX_W0), .W_OUT(TX_W1)) u_s40_20 (
    .clk, .rst_n, .load(stb.s40), .step(stb.s20), .din(word_q), .dout(w20)
  );
  // 20 -> 4, shift-register stage.
  piso_stage #(.W_IN(TX_W1), .W_OUT(TX_W2)) u_s20_4 (
    .clk, .rst_n, .load(stb.s20), .step(stb.s4), .din(w20), .dout(w4)
  );
  // 4 -> 2, high-speed stage.
  piso_stage #(.W_IN(TX_W2), .W_OUT(TX_W3)) u_s4_2 (
    .clk, .rst_n, .load(stb.s4), .step(stb.s2), .din(w4), .dout(w2)
  );
  // 2 -> 1, full-rate stage.
  piso_stage #(.W_IN(TX_W3), .W_OUT(TX_W4)) u_s2_1 (
    .clk, .rst_n, .load(stb.s2), .step(1'b1), .din(w2), .dout(w1)
  );

  assign tx_serial = w1[0];

endmodule
