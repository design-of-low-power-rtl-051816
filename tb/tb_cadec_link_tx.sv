// tb_cadec_link_tx: self-checking test of the CADEC link transmitter.
// Random flits are offered with random gaps while ARQ pulses are returned in
// the way a receiver may return them (only for a flit that was on the link in
// the previous cycle and not in the cycle right after another ARQ). A
// cycle-by-cycle model predicts the link: a flit accepted in cycle t is on the
// link in cycle t+1, correctly CADEC-encoded; after an ARQ in cycle c the link
// repeats the words of cycles c-1 and c in cycles c+1 and c+2, marked as
// replays, and in_ready is low in cycles c and c+1.
module tb_cadec_link_tx;
  import cadec_tb_pkg::*;

  localparam int CYCLES = 4000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, arq = 0;
  logic [31:0] in_flit = '0;
  logic        in_ready, link_valid, replay;
  logic [76:0] link_code;
  int checks = 0, failures = 0;
  int n_arq = 0, n_acc = 0, n_replay = 0;

  logic        ev [0:CYCLES+2];
  logic [31:0] ef [0:CYCLES+2];
  logic        er [0:CYCLES+2];
  logic        arq_h [0:CYCLES+2];

  cadec_link_tx dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(in_flit),
                     .in_ready(in_ready), .link_valid(link_valid), .link_code(link_code),
                     .arq_i(arq), .replay_o(replay));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    ev[0] = 1'b0; ef[0] = '0; er[0] = 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      // Link word of this cycle against the model.
      checks++;
      if (link_valid !== ev[t] || (ev[t] && (link_code !== cadec_encode(ef[t]) || replay !== er[t]))) begin
        failures++;
        $display("FAIL t=%0d link v=%b exp v=%b flit=%h exp %h replay=%b exp %b", t, link_valid, ev[t],
                 ham_data(copy_a(link_code)), ef[t], replay, er[t]);
      end
      // Stimulus for this cycle.
      arq = (t >= 1) && ev[t-1] && !arq_h[t-1] && ($urandom() % 6 == 0);
      arq_h[t] = arq;
      in_valid = ($urandom() % 4 != 0);
      in_flit = rand32();
      #1;
      checks++;
      if (in_ready !== !(arq || (t >= 1 && arq_h[t-1]))) begin
        failures++;
        $display("FAIL t=%0d in_ready=%b", t, in_ready);
      end
      // Model of the next link word.
      if (arq || (t >= 1 && arq_h[t-1])) begin
        ev[t+1] = ev[t-1]; ef[t+1] = ef[t-1]; er[t+1] = ev[t-1];
        if (ev[t-1]) n_replay++;
      end else begin
        ev[t+1] = in_valid && in_ready; ef[t+1] = in_flit; er[t+1] = 1'b0;
      end
      if (arq) n_arq++;
      if (in_valid && in_ready) n_acc++;
      @(negedge clk);
    end
    $display("accepted=%0d arq=%0d replayed=%0d", n_acc, n_arq, n_replay);
    checks++;
    if (n_arq < 10 || n_replay < 10) begin failures++; $display("FAIL too few ARQs"); end
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
