// cadec_enc: CADEC encoder, K-bit flit to a 2N+1 wire code word
// (32 bits to 77 wires at the default K = 32).
//
// Following the document's encoder: the flit is first coded with the
// shortened (38,32) Hamming code; every bit of the Hamming codeword is then
// duplicated onto two adjacent wires (wires 2i and 2i+1 carry Hamming bit i),
// so neighbouring wires can never switch in opposite directions inside a
// pair; finally the overall parity of one Hamming copy goes on the last wire
// (wire 2N, wire 76). Even wires form copy "a", odd wires copy "b".
// Purely combinational: in a switch it sits in front of the output pipeline
// register (see cadec_link_tx).
module cadec_enc #(
  parameter int unsigned K = cadec_pkg::FLIT_W
) (
  input  logic [K-1:0]                              data_i,
  output logic [2*(K+cadec_pkg::ham_r(K))+1-1:0]    code_o
);
  import cadec_pkg::*;

  localparam int unsigned R = ham_r(K);
  localparam int unsigned N = K + R;

  logic [N-1:0] ham;

  hamming_enc #(.K(K)) u_ham (
    .data_i (data_i),
    .code_o (ham)
  );

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      code_o[2*i]   = ham[i];
      code_o[2*i+1] = ham[i];
    end
    code_o[2*N] = ^ham;
  end

endmodule
