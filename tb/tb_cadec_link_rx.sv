// tb_cadec_link_rx: self-checking test of the CADEC link receiver.
// Random CADEC words arrive with gaps and with 0, 1 or 2 wire errors
// (correctable) or three or four wire errors (to be retransmitted). The model predicts, one
// cycle later: the decoded flit with out_valid (and out_corrected when errors
// were present), or arq_o for the uncorrectable word; and it requires the
// word right after an ARQ to be dropped whatever it holds.
module tb_cadec_link_rx;
  import cadec_tb_pkg::*;

  localparam int CYCLES = 4000;

  logic        clk = 0, rst_n = 0;
  logic        link_valid = 0;
  logic [76:0] link_code = '0;
  logic        arq, out_valid, out_corrected;
  logic [31:0] out_flit;
  int checks = 0, failures = 0;
  int n_out = 0, n_cor = 0, n_arq = 0, n_drop = 0;

  cadec_link_rx dut (.clk(clk), .rst_n(rst_n), .link_valid(link_valid), .link_code(link_code),
                     .arq_o(arq), .out_valid(out_valid), .out_flit(out_flit),
                     .out_corrected(out_corrected));

  always #5 clk = ~clk;

  logic        exp_v = 0, exp_arq = 0, exp_cor = 0;
  logic [31:0] exp_f = '0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < CYCLES; t++) begin
      int kind;
      logic [31:0] d;
      checks++;
      if (arq !== exp_arq || out_valid !== exp_v || (exp_v && (out_flit !== exp_f || out_corrected !== exp_cor))) begin
        failures++;
        $display("FAIL t=%0d arq=%b/%b v=%b/%b flit=%h/%h cor=%b/%b", t, arq, exp_arq, out_valid, exp_v,
                 out_flit, exp_f, out_corrected, exp_cor);
      end
      d = rand32();
      kind = $urandom() % 8;   // 0..1 clean, 2..3 single, 4..5 double, 6 triple, 7 quadruple
      link_valid = ($urandom() % 5 != 0);
      case (kind)
        0, 1: link_code = cadec_encode(d);
        2, 3: link_code = cadec_encode(d) ^ rand_errors(1);
        4, 5: link_code = cadec_encode(d) ^ rand_errors(2);
        6:       link_code = cadec_encode(d) ^ rand_errors(3);
        default: link_code = cadec_encode(d) ^ rand_errors(4);
      endcase
      // Prediction for the next cycle (the current arq drops this word).
      if (link_valid && arq) n_drop++;
      exp_arq = link_valid && !arq && (kind >= 6);
      exp_v   = link_valid && !arq && (kind < 6);
      exp_f   = d;
      exp_cor = (kind >= 2);
      if (exp_v) n_out++;
      if (exp_v && exp_cor) n_cor++;
      if (exp_arq) n_arq++;
      @(negedge clk);
    end
    $display("delivered=%0d corrected=%0d arq=%0d dropped=%0d", n_out, n_cor, n_arq, n_drop);
    checks++;
    if (n_arq < 10 || n_drop < 10 || n_cor < 10) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
