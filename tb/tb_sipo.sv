// tb_sipo: self-checking test of the 40-bit deserializer.
//
// Random bits are driven on rx_serial, one per bit clock, and a word clock
// of 40 bit periods on rx_par_clk_in. With a word clock edge first sampled
// at edge n, the dividers reach phase 0 after edge n+3, so words are
// published at the edges n+4+40k. The word published at edge E must hold the
// bits sampled at edges E-53 ... E-14 (bit 0 first), and rx_valid must be
// high exactly in the cycles after those edges. The first two words, which
// contain bits from before the alignment, are not compared.
module tb_sipo;
  import serdes_pkg::*;
  localparam int PUBLISH = 4;   // par edge sampled -> first publishing edge
  localparam int NEDGES = 3000;

  logic             clk = 1'b0, rst_n = 1'b0, rx_par_clk_in = 1'b0, sync_en = 1'b1, rx_serial = 1'b0;
  logic [PAR_W-1:0] rx_data, exp_w;
  logic             rx_valid, rx_par_clk_out;
  divclk_t          div_clk;
  int               checks = 0, failures = 0, words_checked = 0;
  logic             bits[NEDGES];
  int               n0;

  sipo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NEDGES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, pc, ed;
    bit pub;
    e = 0; pc = 13; n0 = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (e < NEDGES) begin
      ed = e - 1;   // outputs show the result of edge ed
      if (n0 >= 0 && ed >= n0 + PUBLISH) begin
        pub = ((ed - n0 - PUBLISH) % 40) == 0;
        checks++;
        if (rx_valid !== pub) begin
          failures++;
          if (failures < 10) $display("edge %0d: rx_valid=%b expected %b", ed, rx_valid, pub);
        end
        if (pub && ed - n0 - PUBLISH >= 80) begin
          for (int j = 0; j < PAR_W; j++) exp_w[j] = bits[ed - 53 + j];
          checks++; words_checked++;
          if (rx_data !== exp_w) begin
            failures++;
            if (failures < 10) $display("edge %0d: rx_data=%h expected %h", ed, rx_data, exp_w);
          end
        end
      end
      rx_par_clk_in = pc < 20;
      if (pc == 0 && n0 < 0) n0 = e;
      pc = (pc + 1) % 40;
      rx_serial = 1'($urandom);
      bits[e] = rx_serial;
      @(posedge clk);
      e++;
      @(negedge clk);
    end
    checks++;
    if (words_checked < 60) begin
      failures++;
      $display("only %0d words checked", words_checked);
    end
    $display("words checked: %0d", words_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
