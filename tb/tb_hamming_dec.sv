// tb_hamming_dec: self-checking test of the (38,32) SEC Hamming decoder.
// Clean and single-error codewords (every position) must decode to the sent
// flit and codeword with the right flags; double errors whose position XOR exceeds 38 must
// be flagged uncorrectable.
module tb_hamming_dec;
  import cadec_tb_pkg::*;

  logic [37:0] code, fixed;
  logic [31:0] data;
  logic [5:0]  syn;
  logic        cor, unc;
  int checks = 0, failures = 0;

  hamming_dec dut (.code_i(code), .data_o(data), .code_o(fixed), .syndrome_o(syn),
                   .corrected_o(cor), .uncorrectable_o(unc));

  initial begin
    for (int n = 0; n < 100; n++) begin
      automatic logic [31:0] d = rand32();
      automatic ham_t c = ham_encode(d);
      code = c;
      #1;
      checks++;
      if (data !== d || fixed !== c || cor || unc) begin failures++; $display("FAIL clean d=%h", d); end
      for (int p = 1; p <= 38; p++) begin
        code = c ^ (38'd1 << (p - 1));
        #1;
        checks++;
        if (data !== d || fixed !== c || !cor || unc || syn != 6'(p)) begin
          failures++;
          $display("FAIL single d=%h p=%0d got %h cor=%b unc=%b", d, p, data, cor, unc);
        end
      end
      for (int p = 1; p <= 38; p++) begin
        for (int q = p + 1; q <= 38; q++) begin
          if ((p ^ q) > 38) begin
            code = c ^ (38'd1 << (p - 1)) ^ (38'd1 << (q - 1));
            #1;
            checks++;
            if (!unc || cor) begin failures++; $display("FAIL double p=%0d q=%0d", p, q); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
