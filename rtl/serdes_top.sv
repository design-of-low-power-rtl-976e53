// serdes_top: the low-power 40-bit SerDes core, with the hybrid test path.
//
// The serializer (piso) turns 40-bit PMA words into a bit stream at one bit
// per bit clock; the deserializer (sipo) turns a recovered bit stream back
// into 40-bit words. They form the digital core of a serial link: on the
// transmit side the serial output would go on to a feed-forward equalizer and
// a line driver, and the bit clock would come from a PLL; on the receive side
// the serial input and its clock would come from an equalizer and a CDR.
// Those analog parts are outside this RTL, so their signals are the ports
// here: clk is the bit clock, tx_serial goes to the equalizer/driver and
// rx_serial comes from the CDR. Transmit and receive share the bit clock;
// each side has its own parallel clock input and sync enable.
//
// Beside the link core sits hybrid_serdes, a separate test path: 8 serial
// bits in, an 8-to-3 encoder as circuit under test, 3 serial bits out, with
// its own clock and reset.
//
// Timing: see piso and sipo. With rx_serial tied to tx_serial and both
// parallel clocks in phase, a word captured by the serializer is published
// by the deserializer 100 bit periods after its capture edge, aligned to the
// same word boundaries.
module serdes_top
  import serdes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // transmit
  input  logic             tx_par_clk_in,
  input  logic             tx_sync_en,
  input  logic [PAR_W-1:0] tx_data,
  output logic             tx_serial,
  output logic             tx_par_clk_out,
  output divclk_t          tx_div_clk,
  // receive
  input  logic             rx_par_clk_in,
  input  logic             rx_sync_en,
  input  logic             rx_serial,
  output logic [PAR_W-1:0] rx_data,
  output logic             rx_valid,
  output logic             rx_par_clk_out,
  output divclk_t          rx_div_clk,
  // hybrid test path
  input  logic             hyb_clk,
  input  logic             hyb_rst_n,
  input  logic             hyb_start,
  input  logic             hyb_sin,
  output logic             hyb_sout,
  output logic             hyb_sout_valid
);

  piso u_piso (
    .clk, .rst_n, .tx_par_clk_in, .sync_en(tx_sync_en), .tx_data,
    .tx_serial, .tx_par_clk_out, .div_clk(tx_div_clk)
  );

  sipo u_sipo (
    .clk, .rst_n, .rx_par_clk_in, .sync_en(rx_sync_en), .rx_serial,
    .rx_data, .rx_valid, .rx_par_clk_out, .div_clk(rx_div_clk)
  );

  hybrid_serdes u_hybrid (
    .clk(hyb_clk), .rst_n(hyb_rst_n), .start(hyb_start), .sin(hyb_sin),
    .sout(hyb_sout), .sout_valid(hyb_sout_valid)
  );

endmodule
