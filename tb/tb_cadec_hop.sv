// tb_cadec_hop: end-to-end test of one CADEC-protected hop at its default
// size (32-bit flits, 77 link wires).
//
// A source offers random flits with random gaps; every link cycle gets a
// random transient error pattern: none, one or two random wires (must be
// corrected on the fly), the parity wire alone, or three or four random
// wires (must be repaired by ARQ and retransmission). A scoreboard requires
// every accepted flit to come out exactly once, in order and intact, and a
// flit that meets no ARQ on the way to come out exactly two cycles after it
// was accepted (one cycle per codec pipeline stage). The test counts each
// mechanism of the hop and fails if one never happened: correction of one and
// of two errors, one error in each copy (decided by the syndrome path), the parity-wire-only
// error, ARQ, dropping of the word behind an ARQ, replay, a failed replay
// retried, and stalls of the source.
module tb_cadec_hop;
  import cadec_tb_pkg::*;

  localparam int CYCLES = 20000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [31:0] in_flit = '0;
  logic [76:0] noise = '0;
  logic        in_ready, out_valid, arq, corrected, retx;
  logic [31:0] out_flit;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_fix1 = 0, n_fix2 = 0, n_syn_a = 0, n_par = 0;
  int n_arq = 0, n_drop = 0, n_replay = 0, n_rearq = 0, n_stall = 0, n_lat = 0;

  logic [31:0] sb_flit [$];
  int          sb_time [$];
  int          last_arq = -100;
  int          cyc = 0;
  word_t       noise_h1 = '0;
  logic        retx_h1 = 0, arq_h1 = 0, arq_h2 = 0;

  function automatic word_t even_wires();
    word_t m = '0;
    for (int i = 0; i < 38; i++) m[2*i] = 1'b1;
    return m;
  endfunction
  localparam word_t EVEN = even_wires();
  localparam word_t ODD  = even_wires() << 1;

  cadec_hop dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(in_flit),
                 .in_ready(in_ready), .link_noise(noise), .out_valid(out_valid),
                 .out_flit(out_flit), .arq(arq), .corrected(corrected), .retx(retx));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      int kind;
      // Outputs of this cycle.
      if (arq) last_arq = cyc;
      if (out_valid) begin
        checks++;
        if (sb_flit.size() == 0) begin
          failures++;
          $display("FAIL t=%0d unexpected flit %h", cyc, out_flit);
        end else begin
          automatic logic [31:0] f = sb_flit.pop_front();
          automatic int          t0 = sb_time.pop_front();
          n_out++;
          if (out_flit !== f) begin
            failures++;
            $display("FAIL t=%0d flit %h expected %h", cyc, out_flit, f);
          end
          if (last_arq < t0) begin
            checks++;
            n_lat++;
            if (cyc - t0 != 2) begin
              failures++;
              $display("FAIL t=%0d latency %0d", cyc, cyc - t0);
            end
          end
        end
      end
      // Channel noise for the word on the link this cycle.
      kind = (cyc < 100) ? 0 : $urandom() % 20;
      if (kind < 9)        noise = '0;
      else if (kind < 12)  noise = rand_errors(1);
      else if (kind < 16)  noise = rand_errors(2);
      else if (kind < 17)  noise = word_t'(1) << 76;
      else if (kind < 19)  noise = rand_errors(3);
      else                 noise = rand_errors(4);
      // Source.
      in_valid = ($urandom() % 5 != 0);
      in_flit  = rand32();
      #1;
      // Mechanism counters, from the hop's ports: corrected and arq in this
      // cycle report on the link word of the previous cycle.
      if (corrected) begin
        if ($countones(noise_h1) == 1 && !noise_h1[76]) n_fix1++;
        if ($countones(noise_h1) == 2) n_fix2++;
        if (noise_h1 == (word_t'(1) << 76)) n_par++;
        if ($countones(noise_h1 & EVEN) == 1 && $countones(noise_h1 & ODD) == 1) n_syn_a++;
      end
      if (arq) begin
        n_arq++;
        if (retx_h1) n_rearq++;
      end
      if (arq_h2 && retx) n_drop++;
      if (retx) n_replay++;
      arq_h2   = arq_h1;
      arq_h1   = arq;
      retx_h1  = retx;
      noise_h1 = noise;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        sb_flit.push_back(in_flit);
        sb_time.push_back(cyc);
        n_in++;
      end
      @(negedge clk);
    end
    // Drain with a clean link.
    in_valid = 0;
    noise = '0;
    repeat (10) begin
      if (out_valid) begin
        automatic logic [31:0] f = sb_flit.pop_front();
        checks++;
        n_out++;
        void'(sb_time.pop_front());
        if (out_flit !== f) begin failures++; $display("FAIL drain flit %h expected %h", out_flit, f); end
      end
      @(negedge clk);
    end
    checks++;
    if (sb_flit.size() != 0) begin failures++; $display("FAIL %0d flits lost", sb_flit.size()); end
    $display("flits in=%0d out=%0d latency-checked=%0d", n_in, n_out, n_lat);
    $display("corrected: single=%0d double=%0d parity-only=%0d syndrome-path copy a=%0d",
             n_fix1, n_fix2, n_par, n_syn_a);
    $display("arq=%0d dropped-after-arq=%0d replayed=%0d arq-on-replay=%0d stall cycles=%0d",
             n_arq, n_drop, n_replay, n_rearq, n_stall);
    checks++;
    if (n_fix1 == 0) begin failures++; $display("FAIL never: single correction"); end
    checks++;
    if (n_fix2 == 0) begin failures++; $display("FAIL never: double correction"); end
    checks++;
    if (n_par == 0) begin failures++; $display("FAIL never: parity-only error"); end
    checks++;
    if (n_syn_a == 0) begin failures++; $display("FAIL never: syndrome path to copy a"); end
    checks++;
    if (n_arq == 0) begin failures++; $display("FAIL never: ARQ"); end
    checks++;
    if (n_drop == 0) begin failures++; $display("FAIL never: drop after ARQ"); end
    checks++;
    if (n_replay == 0) begin failures++; $display("FAIL never: replay"); end
    checks++;
    if (n_rearq == 0) begin failures++; $display("FAIL never: ARQ on a replay"); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL never: source stall"); end
    checks++;
    if (n_lat == 0) begin failures++; $display("FAIL never: latency check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
