// cadec_link_rx: switch input port for a CADEC-coded inter-switch link.
//
// Function. The word on the link is CADEC-decoded in the cycle it arrives and
// registered: the decoder is the first pipeline stage of the switch, as in the
// document, so a flit on the link in cycle t is on out_flit/out_valid in cycle
// t+1. A flit with up to two wire errors is corrected (out_corrected marks
// it). A flit the decoder flags (every flit with three or four wire errors,
// and most with more) is dropped and arq_o is raised in cycle t+1, asking the
// transmitter to send it again. The flit on the link in
// cycle t+1 is dropped without decoding, because the transmitter replays it
// after the repeated flit (go-back-2, see cadec_link_tx); flits therefore leave
// this port in order and exactly once.
//
// link_valid and arq_o are single control wires assumed free of errors; the
// one-cycle ARQ and the drop rule are this design's choices. Reset is
// synchronous and active low.
//
// BSC = 1 selects the boundary-shift layout: words in odd cycles after reset
// are rotated back by one wire before decoding (see bsc_shift), with a phase
// toggle that runs in lockstep with the transmitter's. BSC = 0 is plain CADEC.
module cadec_link_rx #(
  parameter int unsigned K   = cadec_pkg::FLIT_W,
  parameter bit          BSC = 1'b0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   link_valid,
  input  logic [2*(K+cadec_pkg::ham_r(K))+1-1:0] link_code,
  output logic                                   arq_o,
  output logic                                   out_valid,
  output logic [K-1:0]                           out_flit,
  output logic                                   out_corrected
);
  logic [K-1:0] dec_data;
  logic         dec_corrected, dec_arq;
  logic         take;
  logic         phase_q;           // BSC phase of the word now on the link
  logic [2*(K+cadec_pkg::ham_r(K))+1-1:0] word;

  if (BSC) begin : g_bsc
    bsc_shift #(.W(2 * (K + cadec_pkg::ham_r(K)) + 1), .UNSHIFT(1'b1)) u_unshift (
      .code_i  (link_code),
      .shift_i (phase_q),
      .code_o  (word)
    );
  end else begin : g_dap
    assign word = link_code;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) phase_q <= 1'b0;
    else        phase_q <= !phase_q;
  end

  cadec_dec #(.K(K)) u_dec (
    .code_i      (word),
    .data_o      (dec_data),
    .sel_a_o     (),
    .syn_used_o  (),
    .corrected_o (dec_corrected),
    .arq_o       (dec_arq)
  );

  // The word after an ARQ is being replayed anyway: drop it.
  assign take = link_valid && !arq_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      arq_o         <= 1'b0;
      out_valid     <= 1'b0;
      out_flit      <= '0;
      out_corrected <= 1'b0;
    end else begin
      arq_o         <= take && dec_arq;
      out_valid     <= take && !dec_arq;
      out_flit      <= dec_data;
      out_corrected <= take && !dec_arq && dec_corrected;
    end
  end

endmodule
