// tb_cadec_dec: self-checking test of the CADEC decoder.
// For several flits it applies every error pattern of weight 0, 1 and 2 on
// the 77 wires (1 + 77 + 2926 patterns) and requires the flit back without
// ARQ. It checks the copy-selection path for the characteristic cases
// (error in copy a, in copy b, in the parity wire, one in each copy, two in
// one copy). It requires ARQ for every three-error pattern (all 76,076 of
// them, for two flits) and for random four-error patterns.
module tb_cadec_dec;
  import cadec_tb_pkg::*;

  logic [76:0] code;
  logic [31:0] data;
  logic        sel_a, syn_used, cor, arq;
  int checks = 0, failures = 0;
  int arq5 = 0, ok5 = 0, bad5 = 0;

  cadec_dec dut (.code_i(code), .data_o(data), .sel_a_o(sel_a), .syn_used_o(syn_used),
                 .corrected_o(cor), .arq_o(arq));

  function automatic word_t bit_at(input int w);
    return word_t'(1) << w;
  endfunction

  task automatic expect_ok(input word_t w, input logic [31:0] d, input logic exp_cor);
    code = w;
    #1;
    checks++;
    if (data !== d || arq || cor !== exp_cor) begin
      failures++;
      $display("FAIL d=%h err=%h got %h arq=%b cor=%b", d, w ^ cadec_encode(d), data, arq, cor);
    end
  endtask

  task automatic expect_path(input word_t w, input logic exp_sel_a, input logic exp_syn);
    code = w;
    #1;
    checks++;
    if (sel_a !== exp_sel_a || syn_used !== exp_syn) begin
      failures++;
      $display("FAIL path sel_a=%b syn_used=%b exp %b %b", sel_a, syn_used, exp_sel_a, exp_syn);
    end
  endtask

  initial begin
    for (int n = 0; n < 6; n++) begin
      automatic logic [31:0] d = (n == 0) ? 32'h0 : (n == 1) ? 32'hFFFF_FFFF : rand32();
      automatic word_t c = cadec_encode(d);
      expect_ok(c, d, 1'b0);
      for (int i = 0; i < 77; i++) begin
        expect_ok(c ^ bit_at(i), d, 1'b1);
        for (int j = i + 1; j < 77; j++) expect_ok(c ^ bit_at(i) ^ bit_at(j), d, 1'b1);
      end
      // Copy-selection paths.
      expect_path(c ^ bit_at(10), 1'b0, 1'b0);             // copy a bit -> take b
      expect_path(c ^ bit_at(11), 1'b1, 1'b0);             // copy b bit -> take a
      expect_path(c ^ bit_at(76), 1'b0, 1'b1);             // parity wire -> b clean
      expect_path(c ^ bit_at(4) ^ bit_at(31), 1'b1, 1'b1); // one in each copy -> a
      expect_path(c ^ bit_at(3) ^ bit_at(31), 1'b1, 1'b1); // two in b -> b syndrome non-zero -> a
    end
    // Every three-error pattern, for two flits, must raise ARQ.
    for (int n = 0; n < 2; n++) begin
      automatic logic [31:0] d = rand32();
      automatic word_t c = cadec_encode(d);
      for (int i = 0; i < 77; i++)
        for (int j = i + 1; j < 77; j++)
          for (int k = j + 1; k < 77; k++) begin
            code = c ^ bit_at(i) ^ bit_at(j) ^ bit_at(k);
            #1;
            checks++;
            if (!arq) begin
              failures++;
              if (failures < 20) $display("FAIL triple %0d %0d %0d not detected", i, j, k);
            end
          end
    end
    // Random four-error patterns must raise ARQ too.
    for (int n = 0; n < 20000; n++) begin
      code = cadec_encode(rand32()) ^ rand_errors(4);
      #1;
      checks++;
      if (!arq) begin failures++; $display("FAIL quadruple not detected"); end
    end
    // Five errors: statistics only, not all are detectable.
    for (int n = 0; n < 5000; n++) begin
      automatic logic [31:0] d = rand32();
      code = cadec_encode(d) ^ rand_errors(5);
      #1;
      if (arq) arq5++;
      else if (data === d) ok5++;
      else bad5++;
    end
    $display("random five-error patterns: arq=%0d decoded=%0d wrong=%0d", arq5, ok5, bad5);
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
