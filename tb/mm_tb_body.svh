// mm_tb_body.svh: shared body of the end-to-end testbenches of scs_mm_new.
// The including module declares localparam K, NOPS, NEED_SUPP (whether a
// skip suppressed in the last iteration must be seen), clk/rst_n and the DUT
// signals (start, a, b, n_hat, busy, done, s, skip_evt, alpha) and
// instantiates the DUT. This body drives NOPS multiplications (corner cases
// first, then random operands), and checks for each:
//   - s * 2^(K+2) == a * b  (mod n_hat) and s < n_hat + b/4 + 1,
//   - s equal, bit for bit, to an independent algorithm-level model of the
//     skipping Montgomery loop written with whole-word operations,
//   - the start-to-done cycle count equal to the model's
//     5 + (D_hat conversion passes) + (loop cycles) + (extra final passes).
// It also counts every mechanism (skip, 2H passes in both conversions,
// each x selection, skip suppressed in the last iteration) and fails a
// mechanism that never occurred.

  localparam int W  = K + 5;
  localparam int PW = 2 * K + 12;            // width for products
  typedef logic [W-1:0]  word_t;
  typedef logic [PW-1:0] wide_t;

  int checks = 0, failures = 0;
  int n_skip = 0, n_alpha0 = 0, n_pconv = 0, n_fconv = 0, n_supp = 0;
  int n_x[4] = '{0, 0, 0, 0};
  longint tot_cyc = 0;

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (NOPS * (4 * K + 40) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DUT activity counters
  always @(posedge clk) if (rst_n) begin
    if (skip_evt) n_skip++;
  end

  function automatic void h2(ref word_t ss, ref word_t sc);
    word_t s1, c1;
    s1 = ss ^ sc;
    c1 = (ss & sc) << 1;
    ss = s1 ^ c1;
    sc = (s1 & c1) << 1;
  endfunction

  // algorithm-level model; returns result and expected cycle count
  task automatic model(input logic [K-1:0] av, input logic [K-1:0] bv,
                       input logic [K+1:0] nv, output word_t res,
                       output int cyc, output int np, output int nf,
                       output int supp);
    word_t bh, nh, dh, ss, sc, x, s, c;
    logic [K+7:0] ab;      // A with zero bits up to index K+6
    int i, loopc;
    logic q, ai;
    bh = word_t'(bv) << 3;
    nh = word_t'(nv);
    ab = (K+8)'(av);
    ss = bh ^ nh; sc = (bh & nh) << 1;
    np = 0;
    while (sc != 0) begin h2(ss, sc); np++; end
    dh = ss;
    ss = '0; sc = '0; q = 0; ai = 0; i = -1; loopc = 0; supp = 0;
    while (i <= K + 4) begin
      x = (ai && q) ? dh : ai ? bh : q ? nh : '0;
      n_x[{ai, q}]++;   // the DUT matches this model bit and cycle exactly
      s = ss ^ sc ^ x;
      c = ((ss & sc) | (ss & x) | (sc & x)) << 1;
      ss = s >> 1; sc = c >> 1;
      loopc++;
      if (ab[i+1] == 0 && (ss[0] ^ sc[0]) == 0 && ss[0] == 0) begin
        if (i == K + 4) begin
          supp++;
          q = 0; ai = 0; i = i + 1;
        end else begin
          ss = ss >> 1; sc = sc >> 1;
          q = ss[0] ^ sc[0]; ai = ab[i+2]; i = i + 2;
        end
      end else begin
        q = ss[0] ^ sc[0]; ai = ab[i+1]; i = i + 1;
      end
    end
    h2(ss, sc);
    nf = 0;
    while (sc != 0) begin h2(ss, sc); nf++; end
    res = ss;
    cyc = 5 + np + loopc + nf;
  endtask

  function automatic wide_t rnd_w();
    wide_t v;
    for (int j = 0; j < PW; j += 32) v = (v << 32) | wide_t'($urandom);
    return v;
  endfunction

  function automatic logic [K-1:0] rnd_k();
    return K'(rnd_w());
  endfunction

  task automatic run_one(input logic [K-1:0] av, input logic [K-1:0] bv,
                         input logic [K+1:0] nv);
    word_t mres;
    int mcyc, np, nf, supp, cyc;
    wide_t lhs, rhs, sw;
    model(av, bv, nv, mres, mcyc, np, nf, supp);
    @(negedge clk);
    a = av; b = bv; n_hat = nv; start = 1;
    @(posedge clk);
    cyc = 1;   // the edge that samples start
    @(negedge clk);
    start = 0;
    a = rnd_k(); b = rnd_k(); n_hat = (K+2)'(rnd_w());   // operands may change while busy
    while (!done) begin
      if (!alpha && busy) n_alpha0++;
      @(posedge clk); cyc++;
      @(negedge clk);
    end
    tot_cyc += cyc;
    if (np > 0) n_pconv++;
    if (nf > 0) n_fconv++;
    n_supp += supp;
    sw  = wide_t'(s);
    lhs = (sw << (K + 2)) % wide_t'(nv);
    rhs = (wide_t'(av) * wide_t'(bv)) % wide_t'(nv);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL congruence a=%h b=%h n=%h s=%h", av, bv, nv, s);
    end
    checks++;
    if (sw > wide_t'(nv) + (wide_t'(bv) >> 2)) begin
      failures++;
      $display("FAIL bound a=%h b=%h n=%h s=%h", av, bv, nv, s);
    end
    checks++;
    if (word_t'(s) != mres) begin
      failures++;
      $display("FAIL model a=%h b=%h n=%h s=%h model=%h", av, bv, nv, s, mres);
    end
    checks++;
    if (cyc != mcyc) begin
      failures++;
      $display("FAIL cycles a=%h b=%h n=%h got=%0d want=%0d", av, bv, nv, cyc, mcyc);
    end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy still high after done");
    end
  endtask

  function automatic logic [K+1:0] rnd_n();
    logic [K+1:0] v;
    logic [K-1:0] n;
    n = rnd_k();
    n[0] = 1'b1;
    case ($urandom_range(2))
      0: v = (K+2)'(n);                        // N itself
      1: v = (K+2)'(n) * 3;                    // a multiple, N_hat = 3N
      default: begin                           // any odd N_hat < 2^(K+2)
        v = (K+2)'(rnd_w());
        v[0] = 1'b1;
      end
    endcase
    return v;
  endfunction

  task automatic run_all();
    logic [K-1:0] ones;
    ones = '1;
    clk = 0; rst_n = 0; start = 0; a = '0; b = '0; n_hat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // corner cases
    run_one('0, '0, (K+2)'(ones));
    run_one(ones, ones, (K+2)'(ones));
    run_one(ones, ones, {2'b11, ones});
    run_one(K'(1), K'(1), (K+2)'(3));
    run_one(ones, '0, (K+2)'(1));
    run_one(K'(1) << (K - 1), ones, (K+2)'(ones) * 3);
    for (int t = 6; t < NOPS; t++) run_one(rnd_k(), rnd_k() >> $urandom_range(K - 1), rnd_n());
    // mechanisms
    checks++; if (n_skip == 0)   begin failures++; $display("FAIL no skipped iteration"); end
    checks++; if (n_alpha0 == 0) begin failures++; $display("FAIL no 2H_CSA pass"); end
    checks++; if (n_pconv == 0)  begin failures++; $display("FAIL no multi-pass D_hat conversion"); end
    checks++; if (n_fconv == 0)  begin failures++; $display("FAIL no multi-pass final conversion"); end
    checks++; if (NEED_SUPP && n_supp == 0)   begin failures++; $display("FAIL no skip suppressed in the last iteration"); end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (n_x[j] == 0) begin failures++; $display("FAIL x selection %0d never used", j); end
    end
    $display("mechanisms: skips=%0d 2H-cycles=%0d multipass-pre=%0d multipass-final=%0d last-skip-suppressed=%0d x(0,N,B,D)=%0d,%0d,%0d,%0d",
             n_skip, n_alpha0, n_pconv, n_fconv, n_supp, n_x[0], n_x[1], n_x[2], n_x[3]);
    $display("K=%0d: %0d multiplications, %0d clock cycles on average (start to done)",
             K, NOPS, tot_cyc / NOPS);
  endtask
