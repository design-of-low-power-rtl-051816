// tb_cadec_hop_ber: workload test of one CADEC hop at its default size under
// independent random wire errors.
//
// A saturated source sends 16-flit packets (a header flit carrying the packet
// number, then 15 payload flits). Every link wire is inverted independently
// with probability EPS = 1/128 in every cycle, a bit error rate far above a
// real link's so that retransmissions are frequent enough to measure. The
// test requires all packets to arrive complete, in order and intact. It then
// compares the hop's behaviour with the binomial prediction for a 77-wire
// word: the fraction of decoded words sent back with ARQ must match
// P(>= 3 errors), the fraction corrected must match P(1) + P(2), and the
// throughput must match (1 - P3)/(1 + P3), since every ARQ costs its own slot
// and the slot after it. Each comparison allows five standard deviations.
module tb_cadec_hop_ber;
  import cadec_tb_pkg::*;

  localparam int    PACKETS  = 2500;
  localparam int    PKT_LEN  = 16;
  localparam int    EPS_NUM  = 8;      // EPS = 8/1024
  localparam real   EPS      = 8.0 / 1024.0;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [31:0] in_flit = '0;
  logic [76:0] noise = '0;
  logic        in_ready, out_valid, arq, corrected, retx;
  logic [31:0] out_flit;

  int checks = 0, failures = 0;
  int n_arq = 0, n_out = 0, n_cor = 0, n_pkts_in = 0, n_pkts_out = 0;
  int cycles = 0, first_out = -1, last_out = 0;
  int src_pkt = 0, src_idx = 0, sink_pkt = 0, sink_idx = 0;

  cadec_hop dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(in_flit),
                 .in_ready(in_ready), .link_noise(noise), .out_valid(out_valid),
                 .out_flit(out_flit), .arq(arq), .corrected(corrected), .retx(retx));

  always #5 clk = ~clk;

  // Header flit: 0xA5 tag and packet number; payload: packet and index mixed.
  function automatic logic [31:0] flit_of(input int pkt, input int idx);
    if (idx == 0) return {8'hA5, 24'(pkt)};
    return (32'(pkt) * 32'h9E37_79B9) ^ (32'(idx) << 27) ^ 32'(idx);
  endfunction

  function automatic real binom(input int n, input int k, input real e);
    real c = 1.0;
    for (int i = 0; i < k; i++) c = c * real'(n - i) / real'(i + 1);
    return c * (e ** k) * ((1.0 - e) ** (n - k));
  endfunction

  task automatic compare(input string what, input real measured, input real expected, input int n);
    real sd = $sqrt(expected * (1.0 - expected) / real'(n));
    checks++;
    $display("%s: measured %f expected %f (sd %f)", what, measured, expected, sd);
    if (measured > expected + 5.0 * sd || measured < expected - 5.0 * sd) begin
      failures++;
      $display("FAIL %s outside five standard deviations", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sink_pkt < PACKETS && cycles < PACKETS * PKT_LEN * 3) begin
      // Sink side of this cycle.
      if (arq) n_arq++;
      if (out_valid) begin
        n_out++;
        if (corrected) n_cor++;
        if (first_out < 0) first_out = cycles;
        last_out = cycles;
        checks++;
        if (out_flit !== flit_of(sink_pkt, sink_idx)) begin
          failures++;
          $display("FAIL packet %0d flit %0d: %h expected %h", sink_pkt, sink_idx, out_flit,
                   flit_of(sink_pkt, sink_idx));
        end
        if (sink_idx == PKT_LEN - 1) begin
          sink_idx = 0;
          sink_pkt++;
          n_pkts_out++;
        end else sink_idx++;
      end
      // Independent wire errors.
      for (int w = 0; w < 77; w++) noise[w] = (($urandom() % 1024) < EPS_NUM);
      // Saturated source.
      in_valid = (src_pkt < PACKETS);
      in_flit  = flit_of(src_pkt, src_idx);
      #1;
      if (in_valid && in_ready) begin
        if (src_idx == PKT_LEN - 1) begin
          src_idx = 0;
          src_pkt++;
          n_pkts_in++;
        end else src_idx++;
      end
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (n_pkts_out != PACKETS) begin failures++; $display("FAIL %0d of %0d packets arrived", n_pkts_out, PACKETS); end
    $display("packets=%0d flits=%0d cycles=%0d arq=%0d corrected=%0d", n_pkts_out, n_out, cycles, n_arq, n_cor);
    begin
      automatic real p0 = binom(77, 0, EPS);
      automatic real p12 = binom(77, 1, EPS) + binom(77, 2, EPS);
      automatic real p3 = 1.0 - p0 - p12;
      automatic int decoded = n_out + n_arq;
      compare("ARQ fraction of decoded words", real'(n_arq) / real'(decoded), p3, decoded);
      compare("corrected fraction of decoded words", real'(n_cor) / real'(decoded), p12, decoded);
      // Throughput over the steady part (first to last delivered flit).
      checks++;
      begin
        automatic real thr = real'(n_out - 1) / real'(last_out - first_out);
        automatic real exp_thr = (1.0 - p3) / (1.0 + p3);
        $display("throughput: measured %f flits/cycle expected %f", thr, exp_thr);
        if (thr > exp_thr + 0.01 || thr < exp_thr - 0.01) begin
          failures++;
          $display("FAIL throughput");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PACKETS * PKT_LEN * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
