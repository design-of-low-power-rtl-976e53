// tb_hyb_s2p: self-checking test of the hybrid SerDes serial-in register.
// Random bits are shifted in with a random enable; after every edge the
// register must hold the last 8 enabled bits, the earliest in bit 0.
module tb_hyb_s2p;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, sin = 1'b0;
  logic [7:0] q, model = '0;
  int checks = 0, failures = 0, shifts = 0;

  hyb_s2p dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic hist[$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      en  = ($urandom_range(0, 3) != 0);
      sin = 1'($urandom);
      if (en) begin hist.push_back(sin); shifts++; end
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        int idx;
        idx = hist.size() - 8 + b;
        model[b] = (idx >= 0) ? hist[idx] : 1'b0;
      end
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%b expected %b", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
