// tb_cadec_enc: self-checking test of the CADEC encoder (32 -> 77 wires).
// Checks the whole word against the reference model and, separately, the
// code's structure: adjacent wire pairs equal, even copy a valid Hamming
// codeword holding the flit, wire 76 the parity of that copy. Between
// successive words it checks that no wire has both neighbours switching
// against it.
module tb_cadec_enc;
  import cadec_tb_pkg::*;

  logic [31:0] data;
  logic [76:0] code;
  int checks = 0, failures = 0;

  cadec_enc dut (.data_i(data), .code_o(code));

  task automatic check_one(input logic [31:0] d);
    data = d;
    #1;
    checks++;
    if (code !== cadec_encode(d)) begin failures++; $display("FAIL word d=%h", d); end
    checks++;
    if (copy_a(code) !== copy_b(code)) begin failures++; $display("FAIL pairs d=%h", d); end
    checks++;
    if (syndrome(copy_a(code)) != 0 || ham_data(copy_a(code)) !== d) begin
      failures++; $display("FAIL copy d=%h", d);
    end
    checks++;
    if (code[76] !== ^copy_a(code)) begin failures++; $display("FAIL parity d=%h", d); end
  endtask

  // Crosstalk avoidance: between two successive code words no wire may see
  // both of its neighbours switch in the opposite direction (the 010 <-> 101
  // case that raises the coupling to (1+4 lambda)).
  task automatic check_transition(input logic [76:0] w0, input logic [76:0] w1);
    int bad = 0;
    for (int i = 1; i < 76; i++) begin
      if (w0[i] != w1[i] && w0[i-1] != w1[i-1] && w0[i+1] != w1[i+1]
          && w1[i-1] != w1[i] && w1[i+1] != w1[i]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL crosstalk %h -> %h", w0, w1); end
  endtask

  initial begin
    logic [76:0] last;
    check_one(32'h0);
    check_one(32'hFFFF_FFFF);
    last = code;
    for (int n = 0; n < 2000; n++) begin
      check_one(rand32());
      check_transition(last, code);
      last = code;
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
