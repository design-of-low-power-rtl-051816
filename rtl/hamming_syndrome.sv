// hamming_syndrome: syndrome of one N-bit shortened Hamming copy.
//
// The syndrome is the XOR of the (1-based) positions of all ones in the copy.
// It is zero for a valid codeword; for a single flipped bit it equals that
// bit's position. error_o flags a non-zero syndrome. This is the "syndrome
// detection" block of the CADEC decoder, which asks whether copy b is
// error-free. Purely combinational; the bit layout is the one of hamming_enc.
module hamming_syndrome #(
  parameter int unsigned K = cadec_pkg::FLIT_W
) (
  input  logic [K+cadec_pkg::ham_r(K)-1:0] code_i,
  output logic [cadec_pkg::ham_r(K)-1:0]   syndrome_o,
  output logic                             error_o
);
  import cadec_pkg::*;

  localparam int unsigned R = ham_r(K);
  localparam int unsigned N = K + R;

  always_comb begin
    syndrome_o = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      for (int unsigned i = 0; i < R; i++) begin
        if (((p >> i) & 1) == 1) syndrome_o[i] ^= code_i[p-1];
      end
    end
  end

  assign error_o = |syndrome_o;

endmodule
