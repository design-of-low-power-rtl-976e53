// serdes_pkg: constants and types shared by the 40-bit serializer (PISO) and
// deserializer (SIPO).
//
// The whole converter runs in the bit-clock domain: one serial bit per clock
// cycle. The lower rates of the conversion chain (a new 2-, 4-, 8-, 20- or
// 40-bit word every 2, 4, 8, 20 or 40 bit periods) are produced by the divider
// block as one-cycle strobes (strobes_t) and as 50 % duty divided clocks
// (divclk_t). The 40-bit word width and the stage chains 40->20->4->2->1 and
// 1->2->4->8->40 are the published architecture; modelling the multi-phase
// clocks as strobes of one clock is this design's choice.
package serdes_pkg;

  // Width of the parallel word exchanged with the PMA.
  localparam int unsigned PAR_W = 40;

  // Word widths of the serializer chain, first stage input to last stage output.
  localparam int unsigned TX_W0 = 40;
  localparam int unsigned TX_W1 = 20;
  localparam int unsigned TX_W2 = 4;
  localparam int unsigned TX_W3 = 2;
  localparam int unsigned TX_W4 = 1;

  // Word widths of the deserializer chain.
  localparam int unsigned RX_W0 = 1;
  localparam int unsigned RX_W1 = 2;
  localparam int unsigned RX_W2 = 4;
  localparam int unsigned RX_W3 = 8;
  localparam int unsigned RX_W4 = 40;

  // Serializer latency, in bit periods, from the edge that captures a
  // parallel word to the edge after which its bit 0 is on the serial line.
  // The capture sits half a word into the divider period, and each stage
  // hands its word on one input period after it received it.
  localparam int unsigned TX_LATENCY = PAR_W / 2 + TX_W1 + TX_W2 + TX_W3;

  // Deserializer latency, in bit periods, from the edge that samples the
  // last bit of a word to the edge that publishes the word on rx_data.
  localparam int unsigned RX_LATENCY = RX_W3 + RX_W2 + RX_W1;

  // One-cycle enables, high in the cycle before the edge at which a word of
  // the given width starts (divider phase 0 modulo that width).
  typedef struct packed {
    logic s2;   // every 2 bit periods
    logic s4;   // every 4
    logic s8;   // every 8
    logic s20;  // every 20
    logic s40;  // every 40 (word boundary)
    logic cap;  // every 40, half a word after s40: parallel capture point
  } strobes_t;

  // Divided clocks, 50 % duty (the /20 and /40 clocks are high in the first
  // half of their period).
  typedef struct packed {
    logic d2;
    logic d4;
    logic d8;
    logic d20;
    logic d40;
  } divclk_t;

endpackage
