// tb_piso: self-checking test of the 40-bit serializer.
//
// The testbench plays the PMA: it makes a word clock of 40 bit periods
// (tx_par_clk_in) and puts a new random 40-bit word on tx_data at each of
// its rising edges; within 8 bit periods either side of that edge tx_data
// carries random garbage, as from a PMA with skew between data and clock, so
// the serializer must sample mid-word. With a word clock edge first sampled at edge n, the
// serializer's dividers reach phase 0 after edge n+3 and capture the word at
// edge n+24; bit i must then be on tx_serial in the cycle after edge
// n+24+46+i. Every serial bit after the first two words is compared with
// the word it belongs to, which checks order, latency and the rate of one
// word per 40 bit periods; tx_par_clk_out is checked to be a /40 clock in
// phase with the dividers.
module tb_piso;
  import serdes_pkg::*;
  localparam int SYNC_TO_PHASE0 = 3;            // par edge sampled -> phase 0
  localparam int CAPTURE = SYNC_TO_PHASE0 + 1 + PAR_W / 2;
  localparam int LAT = 46;                      // capture edge -> bit 0
  localparam int NWORDS = 60;
  localparam int SKEW = 8;                      // data unsettled +-8 bit periods around the edge

  logic             clk = 1'b0, rst_n = 1'b0, tx_par_clk_in = 1'b0, sync_en = 1'b1;
  logic [PAR_W-1:0] tx_data = '0;
  logic             tx_serial, tx_par_clk_out;
  divclk_t          div_clk;
  int               checks = 0, failures = 0, bits_checked = 0;
  logic [PAR_W-1:0] words[NWORDS];
  int               n0;

  piso dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40 * NWORDS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, pc, k, m, w, i;
    e = 0; pc = 37; k = 0; n0 = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // e counts the posedges since reset release; inputs set now are sampled at edge e
    while (k < NWORDS || e < n0 + 40 * NWORDS + CAPTURE + LAT + 2) begin
      // outputs now show the result of edge e-1
      if (n0 >= 0) begin
        m = e - 1 - CAPTURE - LAT - n0;   // serial bit index since word 0
        if (m >= 80 && m < 40 * NWORDS) begin
          w = m / 40; i = m % 40;
          checks++; bits_checked++;
          if (tx_serial !== words[w][i]) begin
            failures++;
            if (failures < 10) $display("edge %0d: word %0d bit %0d = %b expected %b", e-1, w, i, tx_serial, words[w][i]);
          end
        end
        m = e - 1 - n0 - SYNC_TO_PHASE0;  // divider phase of the coming cycle
        if (m >= 40) begin
          checks++;
          if (tx_par_clk_out !== ((m % 40) < 20)) begin
            failures++;
            if (failures < 10) $display("edge %0d: tx_par_clk_out wrong", e-1);
          end
        end
      end
      // drive the word clock and data
      tx_par_clk_in = pc < 20;
      if (pc == 0 && k < NWORDS) begin
        words[k] = {$urandom, $urandom};
        if (n0 < 0) n0 = e;
        k++;
      end
      // the PMA data is only guaranteed away from the word-clock edge
      if (k > 0 && pc >= SKEW && pc < 40 - SKEW) tx_data = words[k-1];
      else                                       tx_data = {$urandom, $urandom};
      pc = (pc + 1) % 40;
      @(posedge clk);
      e++;
      @(negedge clk);
    end
    checks++;
    if (bits_checked < 40 * (NWORDS - 2)) begin
      failures++;
      $display("only %0d serial bits checked", bits_checked);
    end
    $display("serial bits checked: %0d", bits_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
