// tb_bsc_shift: self-checking test of the boundary-shift stage.
// For random CADEC words it checks the sender's rotation wire by wire
// (parity to wire 0, wire j to wire j+1), that the receiver's stage undoes it,
// that shift_i = 0 passes words unchanged on both sides, and that a link
// alternating between the two layouts still never lets a wire see both
// neighbours switch against it.
module tb_bsc_shift;
  import cadec_tb_pkg::*;

  logic [76:0] word, tx_out, rx_out;
  logic        shift;
  int checks = 0, failures = 0;

  bsc_shift #(.W(77), .UNSHIFT(1'b0)) dut_tx (.code_i(word), .shift_i(shift), .code_o(tx_out));
  bsc_shift #(.W(77), .UNSHIFT(1'b1)) dut_rx (.code_i(tx_out), .shift_i(shift), .code_o(rx_out));

  function automatic int opposite_pairs(input logic [76:0] w0, input logic [76:0] w1);
    int bad = 0;
    for (int i = 1; i < 76; i++)
      if (w0[i] != w1[i] && w0[i-1] != w1[i-1] && w0[i+1] != w1[i+1]
          && w1[i-1] != w1[i] && w1[i+1] != w1[i]) bad++;
    return bad;
  endfunction

  initial begin
    logic [76:0] last;
    last = '0;
    for (int n = 0; n < 3000; n++) begin
      logic ok;
      word  = cadec_encode(rand32());
      shift = n[0];
      #1;
      ok = 1'b1;
      if (shift) begin
        if (tx_out[0] !== word[76]) ok = 1'b0;
        for (int j = 0; j < 76; j++) if (tx_out[j+1] !== word[j]) ok = 1'b0;
      end else if (tx_out !== word) ok = 1'b0;
      checks++;
      if (!ok) begin failures++; $display("FAIL rotate shift=%b %h -> %h", shift, word, tx_out); end
      checks++;
      if (rx_out !== word) begin failures++; $display("FAIL unshift shift=%b", shift); end
      checks++;
      if (opposite_pairs(last, tx_out) != 0) begin failures++; $display("FAIL crosstalk at word %0d", n); end
      last = tx_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
