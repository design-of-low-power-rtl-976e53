// sipo_stage_checker: drives one sipo_stage with random words and random
// gaps between steps, and checks that the output holds, after every N-th
// step, the last N input words with the earliest in the least significant
// position, and otherwise keeps its value. Used by tb_sipo_stage.
module sipo_stage_checker #(
  parameter int unsigned W_IN  = 8,
  parameter int unsigned W_OUT = 40
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = W_OUT / W_IN;

  logic             load = 1'b0, step = 1'b0;
  logic [W_IN-1:0]  din = '0;
  logic [W_OUT-1:0] dout, exp_q = '0, collect = '0;
  int               k = 0;

  sipo_stage #(.W_IN(W_IN), .W_OUT(W_OUT)) dut (.clk, .rst_n, .step, .load, .din, .dout);

  initial begin checks = 0; failures = 0; end

  always @(negedge clk) begin
    if (run) begin
      checks++;
      if (dout !== exp_q) begin
        failures++;
        if (failures < 5) $display("sipo_stage %0d->%0d: dout=%h expected %h", W_IN, W_OUT, dout, exp_q);
      end
      step = ($urandom_range(0, 2) != 0);
      load = step && (k == N - 1);
      din  = W_IN'($urandom);
      if (step) begin
        collect[k*W_IN +: W_IN] = din;
        if (load) exp_q = collect;
        k = (k + 1) % N;
      end
    end else begin
      step = 1'b0;
      load = 1'b0;
    end
  end
endmodule
