// hamming_enc: shortened Hamming encoder, K data bits to an N = K + R bit
// single-error-correcting codeword ((38,32) at the default K = 32).
//
// Data bits are placed, in order, at the Hamming positions that are not powers
// of two; the check bit at position 2**i is the XOR of every data position
// whose index has bit i set, so the finished codeword has syndrome zero.
// Purely combinational. The code size follows the document; the bit layout is
// the textbook one and is this design's choice.
module hamming_enc #(
  parameter int unsigned K = cadec_pkg::FLIT_W
) (
  input  logic [K-1:0]                          data_i,
  output logic [K+cadec_pkg::ham_r(K)-1:0]      code_o
);
  import cadec_pkg::*;

  localparam int unsigned R = ham_r(K);
  localparam int unsigned N = K + R;

  logic [N-1:0] placed;
  logic [R-1:0] check;

  // Scatter the data bits over the non-check positions.
  always_comb begin
    int unsigned j;
    placed = '0;
    j = 0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (!is_pow2(p)) begin
        placed[p-1] = data_i[j];
        j++;
      end
    end
  end

  // Check bit i covers every position with bit i of its index set.
  always_comb begin
    check = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      for (int unsigned i = 0; i < R; i++) begin
        if (((p >> i) & 1) == 1) check[i] ^= placed[p-1];
      end
    end
  end

  always_comb begin
    code_o = placed;
    for (int unsigned i = 0; i < R; i++) code_o[(1 << i) - 1] = check[i];
  end

endmodule
