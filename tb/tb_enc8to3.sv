// tb_enc8to3: exhaustive self-checking test of the 8-to-3 encoder. For
// every one-hot input the output must be the index of the set bit; for every
// other input it must be the bitwise OR of the indices of the set bits (zero
// for the all-zero input), computed here by a loop over the input bits.
module tb_enc8to3;
  logic [7:0] i;
  logic [2:0] y, exp_y;
  int checks = 0, failures = 0, onehot = 0;

  enc8to3 dut (.i, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      i = 8'(v);
      exp_y = '0;
      for (int k = 0; k < 8; k++) if (i[k]) exp_y |= 3'(k);
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("i=%b y=%0d expected %0d", i, y, exp_y);
      end
      if ($countones(i) == 1) begin
        onehot++;
        checks++;
        if (i !== 8'(1) << y) begin failures++; $display("one-hot %b gave %0d", i, y); end
      end
    end
    checks++;
    if (onehot != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
