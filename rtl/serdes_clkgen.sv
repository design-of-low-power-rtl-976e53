// serdes_clkgen: dividers of the serializer and deserializer.
//
// Derives every lower rate of the conversion chain from the bit clock. A
// phase counter runs 0..WORD_W-1 (one count per bit period); a separate
// half-rate flip-flop models the /2 clock that drives the fastest 2:1 stage.
// From them the block produces
//   stb      one-cycle enables: s2, s4, s8, s20 and s40 are high when the
//            counter phase is 0 modulo 2, 4, 8, 20 and 40 (s2 from the
//            half-rate flip-flop), and cap is high at phase WORD_W/2, the
//            point where the serializer samples its parallel input;
//   div_clk  registered 50 % duty divided clocks /2, /4, /8, /20 and /40.
// sync_2p forces the counter and the half-rate flip-flop to phase 0 at the
// next edge; sync_2n, one cycle later, forces the half-rate flip-flop to
// phase 1 (the negative half of the /2 clock), which is where it would be
// anyway. So the counter parity and the half-rate flip-flop always agree, and
// the cycle after sync_2p has phase 0. When the pulses arrive every
// WORD_W cycles at the right point they change nothing.
// That the dividers are restarted by sync_2p/sync_2n follows the published
// architecture; the counter structure and all phase choices are this
// design's own.
module serdes_clkgen
  import serdes_pkg::*;
#(
  parameter int unsigned WORD_W = serdes_pkg::PAR_W
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sync_2p,
  input  logic     sync_2n,
  output strobes_t stb,
  output divclk_t  div_clk
);

  localparam int unsigned CW = $clog2(WORD_W);

  logic [CW-1:0] cnt, cnt_nx;
  logic          ph2, ph2_nx;

  always_comb begin
    if (sync_2p || cnt == CW'(WORD_W - 1)) cnt_nx = '0;
    else                                  cnt_nx = cnt + 1'b1;
    if (sync_2p)      ph2_nx = 1'b0;
    else if (sync_2n) ph2_nx = 1'b1;
    else              ph2_nx = !ph2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ph2     <= 1'b0;
      div_clk <= '0;
    end else begin
      cnt        <= cnt_nx;
      ph2        <= ph2_nx;
      div_clk.d2  <= !ph2_nx;
      div_clk.d4  <= (cnt_nx % 4)  < 2;
      div_clk.d8  <= (cnt_nx % 8)  < 4;
      div_clk.d20 <= (cnt_nx % 20) < 10;
      div_clk.d40 <= cnt_nx < CW'(WORD_W / 2);
    end
  end

  always_comb begin
    stb.s2  = !ph2;
    stb.s4  = (cnt % 4)  == 0;
    stb.s8  = (cnt % 8)  == 0;
    stb.s20 = (cnt % 20) == 0;
    stb.s40 = cnt == '0;
    stb.cap = cnt == CW'(WORD_W / 2);
  end

  initial begin
    if (WORD_W % 40 != 0) $error("serdes_clkgen: WORD_W must be a multiple of 40 so that all stage rates divide it");
  end

  // The half-rate flip-flop and the counter's parity always agree, so the
  // /2 strobe coincides with every slower strobe.
  a_half_rate_phase: assert property (@(posedge clk) disable iff (!rst_n) ph2 == cnt[0]);

endmodule
