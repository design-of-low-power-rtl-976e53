// tb_hybrid_serdes: self-checking test of the hybrid test path
// (serial-in register -> 8-to-3 encoder -> serial-out register).
//
// Sends frames of 8 bits, bit 0 first, with `start` on each frame's first
// bit; most frames are back to back, some follow after idle gaps, and most
// carry one-hot words. For a frame whose bit 0 is sampled at edge t, the
// 3 result bits must appear on sout after edges t+8, t+9 and t+10 with
// sout_valid high, and sout_valid must be low in all other cycles. The
// expected result is the index of the set bit (OR of the indices of all set
// bits for other words), computed in the testbench.
module tb_hybrid_serdes;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sin = 1'b0;
  logic sout, sout_valid;
  int   checks = 0, failures = 0, frames = 0, gaps = 0;
  logic [2:0] res_at[int];   // expected result per frame start edge

  hybrid_serdes dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, pos, ed, t0;
    logic [7:0] w;
    logic [2:0] r;
    bit frame_active, exp_v, exp_b;
    e = 0; pos = 0; frame_active = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (e < 4000) begin
      // outputs show the result of edge e-1
      ed = e - 1;
      exp_v = 1'b0; exp_b = 1'b0;
      for (int j = 0; j < 3; j++) begin
        if (res_at.exists(ed - 8 - j)) begin
          exp_v = 1'b1;
          r = res_at[ed - 8 - j];
          exp_b = r[j];
        end
      end
      checks++;
      if (sout_valid !== exp_v || (exp_v && sout !== exp_b)) begin
        failures++;
        if (failures < 10) $display("edge %0d: sout=%b valid=%b expected %b/%b", ed, sout, sout_valid, exp_b, exp_v);
      end
      // drive the next bit
      start = 1'b0;
      if (!frame_active && e < 3900) begin
        if ($urandom_range(0, 3) != 0 || e < 10) begin
          frame_active = 1;
          pos = 0;
          w = ($urandom_range(0, 4) != 0) ? 8'(1) << $urandom_range(0, 7) : 8'($urandom);
          r = '0;
          for (int k = 0; k < 8; k++) if (w[k]) r |= 3'(k);
        end else begin
          gaps++;
        end
      end
      if (frame_active) begin
        if (pos == 0) begin start = 1'b1; res_at[e] = r; frames++; end
        sin = w[pos];
        pos++;
        if (pos == 8) frame_active = 0;
      end else begin
        sin = 1'($urandom);
      end
      @(posedge clk);
      e++;
      @(negedge clk);
    end
    checks++;
    if (frames < 100 || gaps < 10) begin failures++; $display("too few frames or gaps"); end
    $display("frames=%0d idle gaps=%0d", frames, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
