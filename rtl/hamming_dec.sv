// hamming_dec: shortened Hamming single-error-correcting decoder, N = K + R
// bits back to K data bits ((38,32) at the default K = 32).
//
// The syndrome (from hamming_syndrome) names the position of a single bit
// error; that bit is inverted and the data bits are gathered from the
// non-power-of-two positions. Because the code is shortened, syndromes above
// N cannot come from one error: uncorrectable_o flags them and the word is
// passed through uncorrected. code_o is the corrected N-bit codeword; the
// CADEC decoder compares it with what was received to decide whether to
// request a retransmission. Purely combinational.
module hamming_dec #(
  parameter int unsigned K = cadec_pkg::FLIT_W
) (
  input  logic [K+cadec_pkg::ham_r(K)-1:0] code_i,
  output logic [K-1:0]                     data_o,
  output logic [K+cadec_pkg::ham_r(K)-1:0] code_o,
  output logic [cadec_pkg::ham_r(K)-1:0]   syndrome_o,
  output logic                             corrected_o,
  output logic                             uncorrectable_o
);
  import cadec_pkg::*;

  localparam int unsigned R = ham_r(K);
  localparam int unsigned N = K + R;

  logic         syn_nz;
  logic [N-1:0] fixed;

  hamming_syndrome #(.K(K)) u_syn (
    .code_i     (code_i),
    .syndrome_o (syndrome_o),
    .error_o    (syn_nz)
  );

  assign uncorrectable_o = syn_nz && (int'(syndrome_o) > N);
  assign corrected_o     = syn_nz && !uncorrectable_o;

  always_comb begin
    fixed = code_i;
    for (int unsigned p = 1; p <= N; p++) begin
      if (corrected_o && (int'(syndrome_o) == p)) fixed[p-1] = ~code_i[p-1];
    end
  end

  assign code_o = fixed;

  always_comb begin
    int unsigned j;
    data_o = '0;
    j = 0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (!is_pow2(p)) begin
        data_o[j] = fixed[p-1];
        j++;
      end
    end
  end

endmodule
