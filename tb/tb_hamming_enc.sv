// tb_hamming_enc: self-checking test of the (38,32) Hamming encoder.
// For fixed and random flits it checks, against the reference model, that
// the codeword equals the model's, has syndrome zero and carries the data
// bits unchanged at the data positions.
module tb_hamming_enc;
  import cadec_tb_pkg::*;

  logic [31:0] data;
  logic [37:0] code;
  int checks = 0, failures = 0;

  hamming_enc dut (.data_i(data), .code_o(code));

  task automatic check_one(input logic [31:0] d);
    data = d;
    #1;
    checks++;
    if (code !== ham_encode(d)) begin
      failures++;
      $display("FAIL enc d=%h got %h exp %h", d, code, ham_encode(d));
    end
    checks++;
    if (syndrome(code) != 0) begin failures++; $display("FAIL syndrome d=%h", d); end
    checks++;
    if (ham_data(code) !== d) begin failures++; $display("FAIL data d=%h", d); end
  endtask

  initial begin
    check_one(32'h0);
    check_one(32'hFFFF_FFFF);
    for (int j = 0; j < 32; j++) check_one(32'h1 << j);
    for (int n = 0; n < 2000; n++) check_one(rand32());
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
