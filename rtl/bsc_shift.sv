// bsc_shift: boundary-shift stage for the CADEC link (optional BSC layout).
//
// In the boundary-shift layout every other word on the link is rotated by one
// wire, so that the single parity wire sits at the right-hand end (wire W-1,
// the plain CADEC layout) in one word and at the left-hand end (wire 0) in the
// next, and the duplicated pairs move one wire along with it. On the sending
// side (UNSHIFT = 0) shift_i = 1 rotates the word left by one wire:
// wire 0 <- parity, wire j+1 <- wire j. On the receiving side (UNSHIFT = 1)
// shift_i = 1 undoes that rotation before the CADEC decoder. shift_i = 0
// passes the word unchanged. Purely combinational; the sender and receiver
// drive shift_i from phase registers that toggle every cycle in lockstep.
// The rotation by alternate words follows the boundary-shift scheme that the
// CADEC encoder may use in place of plain duplication; driving the select
// from a phase register rather than from the clock is this design's choice.
module bsc_shift #(
  parameter int unsigned W       = 77,
  parameter bit          UNSHIFT = 1'b0
) (
  input  logic [W-1:0] code_i,
  input  logic         shift_i,
  output logic [W-1:0] code_o
);
  always_comb begin
    if (!shift_i)     code_o = code_i;
    else if (!UNSHIFT) code_o = {code_i[W-2:0], code_i[W-1]};
    else              code_o = {code_i[0], code_i[W-1:1]};
  end
endmodule
