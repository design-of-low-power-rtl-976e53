// tb_serdes_sync: self-checking test of the synchronizer.
//
// Drives par_clk_in with a clock of irregular period and toggles sync_en at
// random. A reference built from the recorded input history predicts, for
// every edge n, sync_2p = sync_en(n) & par(n-2) & !par(n-3) (par(k) being the
// input sampled at edge k) and sync_2n = sync_2p one edge later. Checks both
// outputs every cycle and counts the pulses, failing if none is seen.
module tb_serdes_sync;
  logic clk = 1'b0, rst_n = 1'b0, par_clk_in = 1'b0, sync_en = 1'b0;
  logic sync_2p, sync_2n;
  int   checks = 0, failures = 0, pulses = 0;
  int   n = 0;
  logic par_h[0:4095];
  logic en_h[0:4095];
  logic exp_p_prev = 1'b0;

  serdes_sync dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph, period;
    logic exp_p, exp_n;
    ph = 0; period = 40;
    for (int k = 0; k < 4096; k++) begin par_h[k] = 1'b0; en_h[k] = 1'b0; end
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    while (n < 4000) begin
      // drive the inputs for the coming edge
      if (ph == 0) period = 20 + int'($urandom_range(0, 40));
      par_clk_in = ph < period / 2;
      ph = (ph + 1) % period;
      if ($urandom_range(0, 99) < 3) sync_en = !sync_en;
      if (n < 200) sync_en = 1'b1;
      par_h[n] = par_clk_in;
      en_h[n]  = sync_en;
      @(posedge clk);
      n++;
      @(negedge clk);
      // edge n-1 has just happened
      exp_p = (n >= 3) && en_h[n-1] && par_h[n-3] && (n == 3 || !par_h[n-4]);
      exp_n = exp_p_prev;
      exp_p_prev = exp_p;
      checks += 2;
      if (sync_2p !== exp_p) begin
        failures++;
        if (failures < 10) $display("edge %0d: sync_2p=%b expected %b", n-1, sync_2p, exp_p);
      end
      if (sync_2n !== exp_n) begin
        failures++;
        if (failures < 10) $display("edge %0d: sync_2n=%b expected %b", n-1, sync_2n, exp_n);
      end
      if (exp_p) pulses++;
    end
    checks++;
    if (pulses < 10) begin failures++; $display("too few sync pulses: %0d", pulses); end
    $display("sync pulses seen: %0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
