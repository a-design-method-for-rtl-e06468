// tb_irredundant_cascade_top: end-to-end test of the partitioned cascade.
//
// Four output groups (GROUPS=4) of a 16-output function of 14 inputs, each
// group a four-page cascade of 7-input LUTs (K=7, R=6, PAGES=4).  Group g
// computes f[4g+j] = bit j of ((number of ones in x) + 5g) mod 16 for
// j < m_g, with m_g = 4, 4, 4, 2.  In each cascade page 0 reads x0..x6, pages
// 1 and 2 read four rails (the running count mod 16) and three new inputs,
// and page 3 reads the rails, the output-select variables z0, z1 and x13.
//
// Checks: every output bit against the count taken directly from x; the
// latency, which must be that of the longest group, s*max(m_g) + 3 clocks,
// not the s*sum(m_g) a single cascade would need; a reconfiguration of one
// group (its last page then gives the inverted bit) followed by more
// evaluations.  It counts how often each mechanism occurred -- multiple
// outputs through z, parallel groups finishing at different times, rail
// passing between pages, reconfiguration -- and fails any that never did.
module tb_irredundant_cascade_top;
  localparam int unsigned K = 7, R = 6, N_IN = 14, M_OUT = 16, PAGES = 4, GROUPS = 4;
  localparam int unsigned MG = 4, W = 2, SW = 5, PW = 2, KW = 3, SL = 3, ML = 3, GW = 2;
  localparam int unsigned ZC = R, XC = R + W;
  localparam int unsigned S = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [GW-1:0] cfg_group = '0;
  logic lut_we = 1'b0, sel_we = 1'b0, len_we = 1'b0, start = 1'b0;
  logic [PW-1:0] lut_page = '0, sel_page = '0;
  logic [K-1:0]  lut_addr = '0;
  logic [R-1:0]  lut_data = '0;
  logic [KW-1:0] sel_bit = '0;
  logic [SW-1:0] sel_code = '0;
  logic [SL-1:0] len_pages = '0;
  logic [ML-1:0] len_outputs = '0;
  logic [N_IN-1:0] x = '0;
  logic busy, done;
  logic [M_OUT-1:0] f;

  int m_of [GROUPS] = '{4, 4, 4, 2};
  bit inverted [GROUPS] = '{0, 0, 0, 0};
  int checks = 0, failures = 0;
  int n_multi_output = 0, n_parallel = 0, n_unequal = 0, n_rails = 0, n_reconfig = 0;

  irredundant_cascade_top #(.K(K), .R(R), .N_IN(N_IN), .M_OUT(M_OUT), .PAGES(PAGES),
                            .GROUPS(GROUPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input int g, input int p, input int a, input int d);
    @(negedge clk);
    cfg_group = GW'(g); lut_we = 1'b1; lut_page = PW'(p); lut_addr = K'(a); lut_data = R'(d);
    @(negedge clk) lut_we = 1'b0;
  endtask

  task automatic write_sel(input int g, input int p, input int b, input int code);
    @(negedge clk);
    cfg_group = GW'(g); sel_we = 1'b1; sel_page = PW'(p); sel_bit = KW'(b); sel_code = SW'(code);
    @(negedge clk) sel_we = 1'b0;
  endtask

  // last page of group g: bit z of (rails + x13) mod 16, inverted on request
  task automatic load_last_page(input int g, input bit inv);
    for (int a = 0; a < 2**K; a++) begin
      logic [K-1:0] av = K'(a);
      int sum = (int'(av[3:0]) + av[6]) % 16;
      write_word(g, S - 1, a, int'(sum[int'(av[5:4])] ^ inv));
    end
    inverted[g] = inv;
  endtask

  task automatic load_group(input int g);
    for (int b = 0; b < K; b++) write_sel(g, 0, b, XC + b);                 // x0..x6
    for (int p = 1; p <= 2; p++) begin
      for (int b = 0; b < 4; b++) write_sel(g, p, b, b);                    // rails
      for (int b = 4; b < 7; b++) write_sel(g, p, b, XC + 7 + 3 * (p - 1) + (b - 4));
    end
    for (int b = 0; b < 4; b++) write_sel(g, 3, b, b);
    write_sel(g, 3, 4, ZC); write_sel(g, 3, 5, ZC + 1); write_sel(g, 3, 6, XC + 13);
    for (int a = 0; a < 2**K; a++) begin
      logic [K-1:0] av = K'(a);
      write_word(g, 0, a, ($countones(av) + 5 * g) % 16);
      write_word(g, 1, a, (int'(av[3:0]) + $countones(av[6:4])) % 16);
      write_word(g, 2, a, (int'(av[3:0]) + $countones(av[6:4])) % 16);
    end
    load_last_page(g, 1'b0);
    @(negedge clk);
    cfg_group = GW'(g); len_we = 1'b1; len_pages = SL'(S); len_outputs = ML'(m_of[g]);
    @(negedge clk) len_we = 1'b0;
  endtask

  task automatic evaluate(input logic [N_IN-1:0] xv);
    int cycles, m_max, m_sum;
    logic [M_OUT-1:0] exp_f, f_early;
    bit busy_early;
    @(negedge clk);
    x = xv; start = 1'b1;
    @(negedge clk);
    start = 1'b0; x = ~xv;
    cycles = 1;
    while (!done && cycles < 1000) begin
      @(negedge clk); cycles++;
      // the two-output group is finished while the others still run
      if (cycles == S * m_of[3] + 2) begin f_early = f; busy_early = busy; end
    end
    m_max = 0; m_sum = 0; exp_f = '0;
    for (int g = 0; g < GROUPS; g++) begin
      int v = ($countones(xv) + 5 * g) % 16;
      if (m_of[g] > m_max) m_max = m_of[g];
      m_sum += m_of[g];
      for (int j = 0; j < m_of[g]; j++) exp_f[MG * g + j] = v[j] ^ inverted[g];
    end
    checks++;
    if (cycles != S * m_max + 3) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, S * m_max + 3);
    end else if (cycles < S * m_sum) n_parallel++;
    checks++;
    if (f !== exp_f) begin
      failures++;
      $display("FAIL x=%0h f=%0h expected %0h", xv, f, exp_f);
    end else begin
      if (busy_early && f_early[MG * 3 +: 2] == exp_f[MG * 3 +: 2] &&
          f_early[MG * 3 +: 2] != '0) n_unequal++;
      n_multi_output++;
      if ($countones(xv[13:7]) != 0) n_rails++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < GROUPS; g++) load_group(g);
    evaluate('0);
    evaluate('1);
    for (int i = 0; i < 150; i++) evaluate(N_IN'($urandom));
    // reconfigure group 1 and keep going
    load_last_page(1, 1'b1);
    n_reconfig++;
    for (int i = 0; i < 50; i++) evaluate(N_IN'($urandom));
    load_last_page(1, 1'b0);
    n_reconfig++;
    for (int i = 0; i < 20; i++) evaluate(N_IN'($urandom));

    $display("mechanisms: multi-output=%0d parallel-groups=%0d unequal-groups=%0d rails=%0d reconfig=%0d",
             n_multi_output, n_parallel, n_unequal, n_rails, n_reconfig);
    if (n_multi_output == 0) failures++;
    if (n_parallel == 0) failures++;
    if (n_unequal == 0) failures++;
    if (n_rails == 0) failures++;
    if (n_reconfig == 0) failures++;
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
