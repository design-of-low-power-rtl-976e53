// sipo: 40-bit deserializer (serial in, parallel out).
//
// Takes one bit per bit clock from rx_serial (the recovered data of the CDR)
// and rebuilds 40-bit words, the first-received bit in bit 0. The conversion
// runs through binary stages 1->2->4->8 and a final 8->40 stage. As in the
// serializer, a synchronizer turns rising edges of rx_par_clk_in (while
// sync_en is high) into the pulses sync_2p/sync_2n that restart the
// dividers; the divider phase therefore sets the word boundaries. Chain,
// names and synchronizer follow the published architecture; running all
// stages on the bit clock with enables is this design's choice.
//
// Timing: rx_data changes at the edge ending a divider phase-0 cycle. The
// word published there holds the 40 bits sampled at the 40 consecutive edges
// ending RX_LATENCY (= 14) edges before it: bit 39 is the bit sampled
// 14 edges earlier, bit 0 the one sampled 53 edges earlier. rx_valid is high
// for the one cycle after each update. rx_par_clk_out is the /40 clock.
module sipo
  import serdes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_par_clk_in,
  input  logic             sync_en,
  input  logic             rx_serial,
  output logic [PAR_W-1:0] rx_data,
  output logic             rx_valid,
  output logic             rx_par_clk_out,
  output divclk_t          div_clk
);

  logic     sync_2p, sync_2n;
  strobes_t stb;

  serdes_sync u_sync (
    .clk, .rst_n, .par_clk_in(rx_par_clk_in), .sync_en, .sync_2p, .sync_2n
  );

  serdes_clkgen u_div (
    .clk, .rst_n, .sync_2p, .sync_2n, .stb, .div_clk
  );

  assign rx_par_clk_out = div_clk.d40;

  logic [RX_W1-1:0] w2;
  logic [RX_W2-1:0] w4;
  logic [RX_W3-1:0] w8;

  // 1 -> 2, full-rate stage.
  sipo_stage #(.W_IN(RX_W0), .W_OUT(RX_W1)) u_s1_2 (
    .clk, .rst_n, .step(1'b1), .load(stb.s2), .din(rx_serial), .dout(w2)
  );
  // 2 -> 4.
  sipo_stage #(.W_IN(RX_W1), .W_OUT(RX_W2)) u_s2_4 (
    .clk, .rst_n, .step(stb.s2), .load(stb.s4), .din(w2), .dout(w4)
  );
  // 4 -> 8.
  sipo_stage #(.W_IN(RX_W2), .W_OUT(RX_W3)) u_s4_8 (
    .clk, .rst_n, .step(stb.s4), .load(stb.s8), .din(w4), .dout(w8)
  );
  // 8 -> 40, low-speed stage.
  sipo_stage #(.W_IN(RX_W3), .W_OUT(RX_W4)) u_s8_40 (
    .clk, .rst_n, .step(stb.s8), .load(stb.s40), .din(w8), .dout(rx_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_valid <= 1'b0;
    else        rx_valid <= stb.s40;
  end

endmodule
