// enc8to3: 8-to-3 binary encoder, the circuit under test of the hybrid
// test SerDes.
//
// For a one-hot input with bit k set, y = k. It is the classic OR-plane
// encoder: output bit b is the OR of every input whose index has bit b set,
// so input bit 0 contributes nothing and an all-zero input also gives 0. With
// more than one input set the result is the OR of their indices. Only the
// encoder's name and size are given in the description; this OR-plane form
// is the common textbook circuit and this design's choice. Purely
// combinational.
module enc8to3 #(
  parameter int unsigned N_OUT = 3
) (
  input  logic [2**N_OUT-1:0] i,
  output logic [N_OUT-1:0]    y
);

  always_comb begin
    y = '0;
    for (int k = 0; k < 2**N_OUT; k++) begin
      for (int b = 0; b < N_OUT; b++) begin
        if (k[b] && i[k]) y[b] = 1'b1;
      end
    end
  end

endmodule
