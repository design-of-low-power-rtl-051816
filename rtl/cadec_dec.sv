// cadec_dec: CADEC decoder, 2N+1 received wires back to the K-bit flit
// (77 wires to 32 bits at the default K = 32). Corrects every pattern of up
// to two wire errors and raises arq_o for every pattern of three or four.
//
// The decoder follows the document's flow:
//   1. split the word into copy a (even wires), copy b (odd wires) and the
//      sent parity p0 (wire 2N); compute the parities p1 of a and p2 of b;
//   2. if p1 != p2, one copy holds an odd number of errors: take b when its
//      parity matches p0, else a (no syndrome is needed on this path);
//   3. if p1 == p2, look at the syndrome of b: take b if it is zero, else a;
//   4. correct the chosen copy with the (38,32) SEC Hamming decoder.
// With at most two errors the chosen copy never holds more than one error, so
// step 4 always restores the flit.
//
// ARQ. A flit with three or more wire errors is to be retransmitted. The
// CADEC code has minimum distance 7: a Hamming codeword of weight 3 becomes
// 6 wires plus a parity of 1. So with up to two errors the corrected copy,
// re-expanded to 77 wires, differs from the received word in at most two
// places; with three or four errors it differs in at least three, whether the
// decoder restored the flit or chose a wrong codeword. arq_o is therefore
// raised when the corrected copy disagrees with copy a, copy b and the parity
// wire in three or more places in all, or when the chosen copy's syndrome
// cannot come from a single error. Every pattern of three or four errors is
// detected. This comparison stands in for the extra syndrome check on the
// chosen copy that the scheme proposes; taken literally, that check would
// also reject one error in each copy, which must be corrected.
// The syndrome unit of step 3 sees copy b only when p1 == p2; otherwise its
// inputs are held at zero (operand isolation), so on the common single-error
// path it does not switch, which is the energy saving the scheme aims at.
// Gating the inputs with AND gates is this design's choice.
// Purely combinational; the outputs sel_a_o and syn_used_o show which path
// decided, and corrected_o that some wire error was seen and removed.
module cadec_dec #(
  parameter int unsigned K = cadec_pkg::FLIT_W
) (
  input  logic [2*(K+cadec_pkg::ham_r(K))+1-1:0] code_i,
  output logic [K-1:0]                           data_o,
  output logic                                   sel_a_o,
  output logic                                   syn_used_o,
  output logic                                   corrected_o,
  output logic                                   arq_o
);
  import cadec_pkg::*;

  localparam int unsigned R = ham_r(K);
  localparam int unsigned N = K + R;

  logic [N-1:0] copy_a, copy_b, chosen, syn_in;
  logic         p0, p1, p2;
  logic         err_b, unc_sel;
  logic [N-1:0] fixed;
  logic [2*N:0] mismatch;
  logic [1:0]   n_mis;          // wire disagreements, saturating at 3

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      copy_a[i] = code_i[2*i];
      copy_b[i] = code_i[2*i+1];
    end
  end

  assign p0 = code_i[2*N];
  assign p1 = ^copy_a;
  assign p2 = ^copy_b;

  // Operand isolation: the syndrome inputs only move when step 3 needs them.
  assign syn_in = copy_b & {N{p1 == p2}};

  hamming_syndrome #(.K(K)) u_syn_b (
    .code_i     (syn_in),
    .syndrome_o (),
    .error_o    (err_b)
  );

  // Copy selection (document's Fig. 3 flow).
  always_comb begin
    if (p1 != p2) sel_a_o = (p0 != p2);
    else          sel_a_o = err_b;
  end
  assign syn_used_o = (p1 == p2);
  assign chosen     = sel_a_o ? copy_a : copy_b;

  hamming_dec #(.K(K)) u_ham_dec (
    .code_i          (chosen),
    .data_o          (data_o),
    .code_o          (fixed),
    .syndrome_o      (),
    .corrected_o     (),
    .uncorrectable_o (unc_sel)
  );

  // Wires on which the received word disagrees with the corrected codeword.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      mismatch[2*i]   = copy_a[i] ^ fixed[i];
      mismatch[2*i+1] = copy_b[i] ^ fixed[i];
    end
    mismatch[2*N] = p0 ^ (^fixed);
  end

  always_comb begin
    n_mis = 2'd0;
    for (int unsigned w = 0; w <= 2*N; w++) begin
      if (mismatch[w] && n_mis != 2'd3) n_mis = n_mis + 2'd1;
    end
  end

  assign arq_o = unc_sel || (n_mis == 2'd3);

  assign corrected_o = !arq_o && (mismatch != '0);

endmodule
