// tb_hyb_p2s: self-checking test of the hybrid SerDes serial-out register.
// Random 3-bit words are loaded at random times; after a load, sout must
// give the word bit 0 first, one bit per cycle, then zeros until the next
// load.
module tb_hyb_p2s;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, sout;
  logic [2:0] d = '0, word = '0;
  int checks = 0, failures = 0, loads = 0, since = 99;

  hyb_p2s dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      load = ($urandom_range(0, 4) == 0);
      d    = 3'($urandom);
      if (load) begin word = d; since = 0; loads++; end
      else since++;
      @(negedge clk);
      e = (since < 3) ? word[since] : 1'b0;
      checks++;
      if (sout !== e) begin
        failures++;
        if (failures < 10) $display("cycle %0d: sout=%b expected %b", t, sout, e);
      end
    end
    checks++;
    if (loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
