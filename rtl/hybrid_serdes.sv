// hybrid_serdes: test path of the hybrid SerDes with its 8-to-3 encoder.
//
// A circuit under test with 8 inputs and 3 outputs is reached through one
// serial input and one serial output. Frames of 8 bits arrive on sin, bit 0
// first; `start` marks the cycle that carries bit 0 of a frame. Frames may
// follow back to back or with idle cycles between them; bits outside a frame
// are ignored. The 8 bits are shifted into
// hyb_s2p, the encoder evaluates the complete word, and in the cycle after
// the eighth bit hyb_p2s loads the 3-bit result, which then leaves on sout,
// bit 0 first, during the next 3 cycles, with sout_valid high. Every part runs
// on one clock, as the hybrid SerDes runs all its parts on one shared clock.
// The arrangement serial-in register -> circuit under test -> serial-out
// register follows the description; framing, `start` and sout_valid are this
// design's choices.
//
// Timing: if bit 0 of a frame is sampled at edge t, hyb_p2s loads at edge
// t+N_IN and result bit j is on sout between edges t+N_IN+j and t+N_IN+j+1.
module hybrid_serdes #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic sin,
  output logic sout,
  output logic sout_valid
);

  localparam int unsigned CW = $clog2(N_IN);

  logic [CW-1:0]    bit_cnt;
  logic             frame_on, full;
  logic [N_IN-1:0]  q;
  logic [N_OUT-1:0] y;
  logic [N_OUT-1:0] vsr;

  // Counts the bits of the current frame; `full` marks the cycle after the
  // last bit has been shifted in.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt  <= '0;
      frame_on <= 1'b0;
      full     <= 1'b0;
    end else begin
      full <= 1'b0;
      if (start) begin
        bit_cnt  <= CW'(1);
        frame_on <= 1'b1;
      end else if (frame_on) begin
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == CW'(N_IN - 1)) begin
          full     <= 1'b1;
          frame_on <= 1'b0;
        end
      end
    end
  end

  hyb_s2p #(.W(N_IN)) u_s2p (.clk, .rst_n, .en(1'b1), .sin, .q);

  enc8to3 #(.N_OUT(N_OUT)) u_cut (.i(q), .y);

  hyb_p2s #(.W(N_OUT)) u_p2s (.clk, .rst_n, .load(full), .d(y), .sout);

  // Marks which cycles carry a result bit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    vsr <= '0;
    else if (full) vsr <= '1;
    else           vsr <= vsr >> 1;
  end
  assign sout_valid = vsr[0];

  initial begin
    if (N_IN != 2**N_OUT) $error("hybrid_serdes: N_IN must be 2**N_OUT");
  end

endmodule
