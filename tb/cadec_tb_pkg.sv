// cadec_tb_pkg: reference model of the 32-bit CADEC code for the testbenches,
// written independently of the RTL (bit-serial loops over explicit position
// lists). Hamming positions are 1..38 with check bits at 1,2,4,8,16,32; CADEC
// wire 2i and 2i+1 carry Hamming bit i, wire 76 the parity of one copy.
package cadec_tb_pkg;

  localparam int KB = 32;
  localparam int NB = 38;
  localparam int WB = 77;

  typedef logic [NB-1:0] ham_t;
  typedef logic [WB-1:0] word_t;

  // Data positions (1-based) in order: every position that is not 1,2,4,8,16,32.
  function automatic int data_pos(input int j);
    int cnt = 0;
    for (int p = 1; p <= NB; p++) begin
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        if (cnt == j) return p;
        cnt++;
      end
    end
    return -1;
  endfunction

  function automatic logic [5:0] syndrome(input ham_t c);
    logic [5:0] s = '0;
    for (int p = 1; p <= NB; p++) if (c[p-1]) s ^= 6'(p);
    return s;
  endfunction

  function automatic ham_t ham_encode(input logic [KB-1:0] d);
    ham_t c = '0;
    logic [5:0] s;
    for (int j = 0; j < KB; j++) c[data_pos(j)-1] = d[j];
    s = syndrome(c);
    // Setting check bit 2^i to s[i] cancels syndrome bit i.
    for (int i = 0; i < 6; i++) c[(1 << i) - 1] = s[i];
    return c;
  endfunction

  function automatic logic [KB-1:0] ham_data(input ham_t c);
    logic [KB-1:0] d;
    for (int j = 0; j < KB; j++) d[j] = c[data_pos(j)-1];
    return d;
  endfunction

  function automatic word_t cadec_encode(input logic [KB-1:0] d);
    ham_t  h = ham_encode(d);
    word_t w;
    logic  par = 1'b0;
    for (int i = 0; i < NB; i++) begin
      w[2*i] = h[i];
      w[2*i+1] = h[i];
      par ^= h[i];
    end
    w[2*NB] = par;
    return w;
  endfunction

  function automatic ham_t copy_a(input word_t w);
    ham_t h;
    for (int i = 0; i < NB; i++) h[i] = w[2*i];
    return h;
  endfunction

  function automatic ham_t copy_b(input word_t w);
    ham_t h;
    for (int i = 0; i < NB; i++) h[i] = w[2*i+1];
    return h;
  endfunction

  // Mask of k distinct random wires out of 77.
  function automatic word_t rand_errors(input int k);
    word_t m = '0;
    int n = 0;
    while (n < k) begin
      int w = $urandom() % WB;
      if (!m[w]) begin
        m[w] = 1'b1;
        n++;
      end
    end
    return m;
  endfunction

  function automatic logic [31:0] rand32();
    return $urandom();
  endfunction

endpackage
