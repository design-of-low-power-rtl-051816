// tb_hamming_syndrome: self-checking test of the Hamming syndrome block.
// Valid codewords from the reference model must give syndrome 0; flipping
// position p must give syndrome p; flipping p and q must give p XOR q.
module tb_hamming_syndrome;
  import cadec_tb_pkg::*;

  logic [37:0] code;
  logic [5:0]  syn;
  logic        err;
  int checks = 0, failures = 0;

  hamming_syndrome dut (.code_i(code), .syndrome_o(syn), .error_o(err));

  task automatic expect_syn(input logic [37:0] c, input logic [5:0] s);
    code = c;
    #1;
    checks++;
    if (syn !== s || err !== (s != 0)) begin
      failures++;
      $display("FAIL c=%h syn=%0d err=%b exp %0d", c, syn, err, s);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      automatic ham_t c = ham_encode(rand32());
      automatic int p = 1 + ($urandom() % 38);
      automatic int q = 1 + ($urandom() % 38);
      expect_syn(c, 6'd0);
      expect_syn(c ^ (38'd1 << (p - 1)), 6'(p));
      if (p != q) expect_syn(c ^ (38'd1 << (p - 1)) ^ (38'd1 << (q - 1)), 6'(p ^ q));
    end
    for (int p = 1; p <= 38; p++) expect_syn(38'd1 << (p - 1), 6'(p));
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
