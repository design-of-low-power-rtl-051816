// cadec_link_tx: switch output port for a CADEC-coded inter-switch link, with
// switch-to-switch flit-level retransmission.
//
// Function. A flit accepted on in_valid/in_ready is CADEC-encoded and
// registered onto the link (link_valid, link_code): the encoder is the last
// pipeline stage of the switch, as in the document's pipelined switch, and
// the flit appears on the link the cycle after it is accepted. When the
// receiver finds a flit it cannot correct it raises arq_i one cycle after that
// flit was on the link; the port then sends that flit again, followed by the
// flit that was on the link while arq_i was raised (the receiver has dropped
// it), and only then resumes with new input: a go-back-2 replay.
//
// Retransmission buffer. Two raw flits are kept: the one on the link in the
// previous cycle (the only one an ARQ can name, because the round trip is one
// cycle) and, during a replay, the one waiting to follow it. Storing the 32-bit
// flit instead of the 77-bit code word keeps the buffer small; replayed flits
// are re-encoded. in_ready is low in the cycle arq_i is seen and in the next,
// so each ARQ costs exactly two link cycles.
//
// Retransmission, ARQ and the encoder as a pipeline stage follow the document;
// the one-cycle ARQ timing, the go-back-2 replay, the valid/ready upstream
// handshake and the uncoded link_valid/arq control wires are this design's
// choices. Reset is synchronous and active low.
//
// BSC = 1 selects the boundary-shift layout: every word on the link in an
// odd cycle after reset is rotated by one wire (see bsc_shift). The phase is
// a free-running toggle, so the receiver, reset in the same cycle, stays in
// step with it through idles and replays. BSC = 0 (default) is plain CADEC.
module cadec_link_tx #(
  parameter int unsigned K   = cadec_pkg::FLIT_W,
  parameter bit          BSC = 1'b0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  logic [K-1:0]                           in_flit,
  output logic                                   in_ready,
  output logic                                   link_valid,
  output logic [2*(K+cadec_pkg::ham_r(K))+1-1:0] link_code,
  input  logic                                   arq_i,
  output logic                                   replay_o
);
  import cadec_pkg::*;

  localparam int unsigned W = 2 * (K + ham_r(K)) + 1;

  typedef struct packed {
    logic         v;
    logic [K-1:0] f;
  } slot_t;

  slot_t cur_q, prev_q, pend_q, nxt;
  logic  pend_v_q;
  logic  nxt_replay;
  logic  phase_q;                  // BSC phase of the word now on the link
  logic [W-1:0] nxt_code, nxt_word;

  assign in_ready = !arq_i && !pend_v_q;

  always_comb begin
    nxt_replay = 1'b1;
    if (arq_i)         nxt = prev_q;
    else if (pend_v_q) nxt = pend_q;
    else begin
      nxt        = '{v: in_valid, f: in_flit};
      nxt_replay = 1'b0;
    end
  end

  cadec_enc #(.K(K)) u_enc (
    .data_i (nxt.f),
    .code_o (nxt_code)
  );

  // The word registered now is on the link next cycle, in phase !phase_q.
  if (BSC) begin : g_bsc
    bsc_shift #(.W(W), .UNSHIFT(1'b0)) u_shift (
      .code_i  (nxt_code),
      .shift_i (!phase_q),
      .code_o  (nxt_word)
    );
  end else begin : g_dap
    assign nxt_word = nxt_code;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) phase_q <= 1'b0;
    else        phase_q <= !phase_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_q      <= '0;
      prev_q     <= '0;
      pend_q     <= '0;
      pend_v_q   <= 1'b0;
      link_valid <= 1'b0;
      link_code  <= '0;
      replay_o   <= 1'b0;
    end else begin
      cur_q      <= nxt;
      prev_q     <= cur_q;
      link_valid <= nxt.v;
      link_code  <= nxt_word;
      replay_o   <= nxt_replay && nxt.v;
      if (arq_i) begin
        pend_q   <= cur_q;
        pend_v_q <= 1'b1;
      end else begin
        pend_v_q <= 1'b0;
      end
    end
  end

  // The receiver only names a real flit, and never the one it dropped.
  a_arq_names_flit : assert property (@(posedge clk) disable iff (!rst_n)
                                      arq_i |-> (prev_q.v && !pend_v_q));

endmodule
