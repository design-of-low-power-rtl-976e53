// piso_stage_checker: drives one piso_stage with random words and random
// gaps between steps, and checks every output word against the slice of the
// loaded word it should be (slice k after the k-th step since the load,
// least significant slice first). Used by tb_piso_stage.
module piso_stage_checker #(
  parameter int unsigned W_IN  = 40,
  parameter int unsigned W_OUT = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = W_IN / W_OUT;

  logic             load = 1'b0, step = 1'b0;
  logic [W_IN-1:0]  din = '0, word = '0;
  logic [W_OUT-1:0] dout, exp_q;
  int               k = 0;
  bit               started = 1'b0;

  piso_stage #(.W_IN(W_IN), .W_OUT(W_OUT)) dut (.clk, .rst_n, .load, .step, .din, .dout);

  initial begin checks = 0; failures = 0; end

  always @(negedge clk) begin
    if (run) begin
      // check the result of the previous edge
      if (started) begin
        checks++;
        if (dout !== exp_q) begin
          failures++;
          if (failures < 5) $display("piso_stage %0d->%0d: dout=%h expected %h", W_IN, W_OUT, dout, exp_q);
        end
      end
      // choose this cycle's inputs
      step = ($urandom_range(0, 2) != 0);
      load = step && (k == 0);
      din  = {$urandom, $urandom};
      if (step) begin
        if (load) word = din;
        exp_q   = W_OUT'(word >> (k * W_OUT));
        k       = (k + 1) % N;
        started = 1'b1;
      end
    end else begin
      step = 1'b0;
      load = 1'b0;
    end
  end
endmodule
