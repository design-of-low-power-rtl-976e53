// tb_sipo_stage: self-checking test of the serial-to-parallel stage at the
// four widths used in the deserializer (1->2, 2->4, 4->8, 8->40), each
// driven by a sipo_stage_checker with random data and random step gaps.
module tb_sipo_stage;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  int   c[4], f[4];
  int   checks, failures;

  always #5 clk = ~clk;

  sipo_stage_checker #(.W_IN(1), .W_OUT(2))  u0 (.clk, .rst_n, .run, .checks(c[0]), .failures(f[0]));
  sipo_stage_checker #(.W_IN(2), .W_OUT(4))  u1 (.clk, .rst_n, .run, .checks(c[1]), .failures(f[1]));
  sipo_stage_checker #(.W_IN(4), .W_OUT(8))  u2 (.clk, .rst_n, .run, .checks(c[2]), .failures(f[2]));
  sipo_stage_checker #(.W_IN(8), .W_OUT(40)) u3 (.clk, .rst_n, .run, .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2]+c[3], f[0]+f[1]+f[2]+f[3]+1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run = 1'b1;
    repeat (3000) @(posedge clk);
    run = 1'b0;
    @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
      if (c[i] < 100) begin failures++; $display("checker %0d ran too few checks", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
