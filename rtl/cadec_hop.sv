// cadec_hop: one CADEC-protected switch-to-switch hop of a network on chip.
//
// The upstream switch's output port (cadec_link_tx: CADEC encoder stage and
// retransmission buffer) drives 77 link wires into the downstream switch's
// input port (cadec_link_rx: CADEC decoder stage), which returns a one-wire
// ARQ. The link wires are where transient errors happen; link_noise models
// them: each set bit inverts that wire for the current cycle (all zero for a
// clean link). Up to two inverted wires per flit are corrected on the fly;
// more are, when detected, repaired by retransmission.
//
// Timing: a flit accepted on in_valid/in_ready in cycle t is on the link in
// cycle t+1 and leaves on out_valid/out_flit in cycle t+2. Each ARQ stalls
// in_ready for two cycles. arq, corrected and retx expose the hop's events.
// BSC = 1 puts the link in the boundary-shift layout (every other word
// rotated by one wire); the default is the plain CADEC layout.
// The hop, its codec and its retransmission follow the document; the noise
// port and the handshakes are this design's choices.
module cadec_hop #(
  parameter int unsigned K   = cadec_pkg::FLIT_W,
  parameter bit          BSC = 1'b0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  logic [K-1:0]                           in_flit,
  output logic                                   in_ready,
  input  logic [2*(K+cadec_pkg::ham_r(K))+1-1:0] link_noise,
  output logic                                   out_valid,
  output logic [K-1:0]                           out_flit,
  output logic                                   arq,
  output logic                                   corrected,
  output logic                                   retx
);
  import cadec_pkg::*;

  localparam int unsigned W = 2 * (K + ham_r(K)) + 1;

  logic         link_valid;
  logic [W-1:0] link_sent, link_recv;

  cadec_link_tx #(.K(K), .BSC(BSC)) u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_flit    (in_flit),
    .in_ready   (in_ready),
    .link_valid (link_valid),
    .link_code  (link_sent),
    .arq_i      (arq),
    .replay_o   (retx)
  );

  assign link_recv = link_sent ^ link_noise;

  cadec_link_rx #(.K(K), .BSC(BSC)) u_rx (
    .clk           (clk),
    .rst_n         (rst_n),
    .link_valid    (link_valid),
    .link_code     (link_recv),
    .arq_o         (arq),
    .out_valid     (out_valid),
    .out_flit      (out_flit),
    .out_corrected (corrected)
  );

endmodule
