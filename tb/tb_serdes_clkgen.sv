// tb_serdes_clkgen: self-checking test of the dividers.
//
// Runs the dividers free after reset, then applies sync_2p/sync_2n pairs at
// random times (so the phase jumps) and also at exactly the natural word
// boundary (so nothing may change). The reference is the number of cycles
// since reset or since the last sync_2p, taken modulo 40: every strobe
// (phase 0 modulo 2, 4, 8, 20, 40, and phase 20 for the capture point) and
// every divided clock (high in the first half of its period) is compared
// with it each cycle. Also checks that s40 comes exactly every 40 cycles
// between alignments.
module tb_serdes_clkgen;
  import serdes_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b0, sync_2p = 1'b0, sync_2n = 1'b0;
  strobes_t stb;
  divclk_t  div_clk;
  int       checks = 0, failures = 0, jumps = 0, quiet_syncs = 0;

  serdes_clkgen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s=%b expected %b", t, what, got, exp);
    end
  endtask

  initial begin
    int  phase;
    phase = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      // In cycle t the divider phase should be `phase`.
      chk(stb.s2, (phase % 2) == 0, "s2", t);
      if (t > 0) chk(div_clk.d2, (phase % 2) == 0, "d2", t);
      chk(stb.s4,  (phase % 4) == 0, "s4", t);
      chk(stb.s8,  (phase % 8) == 0, "s8", t);
      chk(stb.s20, (phase % 20) == 0, "s20", t);
      chk(stb.s40, phase == 0, "s40", t);
      chk(stb.cap, phase == 20, "cap", t);
      if (t > 0) begin
        chk(div_clk.d4,  (phase % 4) < 2, "d4", t);
        chk(div_clk.d8,  (phase % 8) < 4, "d8", t);
        chk(div_clk.d20, (phase % 20) < 10, "d20", t);
        chk(div_clk.d40, phase < 20, "d40", t);
      end
      // sync inputs for this cycle: sync_2n always follows sync_2p
      sync_2n = sync_2p;
      sync_2p = 1'b0;
      if (t > 200 && !sync_2n && $urandom_range(0, 99) == 0) sync_2p = 1'b1;
      if (t > 200 && !sync_2n && phase == 39 && $urandom_range(0, 9) == 0) sync_2p = 1'b1;
      if (sync_2p) begin
        if (phase != 39) begin
          jumps++;
        end else begin
          quiet_syncs++;
        end
        phase = 0;
      end else begin
        phase = (phase + 1) % 40;
      end
      @(negedge clk);
    end
    checks++;
    if (jumps < 5 || quiet_syncs < 3) begin
      failures++;
      $display("too few alignments: jumps=%0d quiet=%0d", jumps, quiet_syncs);
    end
    $display("phase jumps=%0d, syncs at the natural boundary=%0d", jumps, quiet_syncs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
