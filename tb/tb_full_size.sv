// tb_full_size: one complete configuration and evaluation run of the
// cascade at its default size (K=15, R=14, 256 inputs, up to 245 outputs,
// 34 pages, one group).
//
// The function loaded is the 4-output function f_j(x) = bit j of
// (number of ones in the 256 inputs) mod 16.  Its cascade: page 0 counts
// x0..x14; each following page reads the 4-rail running count and up to 11
// new inputs; the last page reads the count, the output-select variables
// z0, z1 and the last 9 inputs and gives bit z of the final count.  That is
// 24 pages of 2**15 words, written one word per clock.  Unused address bits
// are set to the constant-0 source.  The testbench then evaluates all-zero,
// all-one and random inputs, checking every output and the s*m + 2 clock
// latency of each evaluation.
module tb_full_size;
  localparam int unsigned K = 15, R = 14, N_IN = 256, M_OUT = 245, PAGES = 34;
  localparam int unsigned W = 8, SW = 9, PW = 6, KW = 4, SL = 6, ML = 8;
  localparam int unsigned ZC = R, XC = R + W, CZERO = R + W + N_IN;
  localparam int unsigned M = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [0:0] cfg_group = '0;
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
  int checks = 0, failures = 0;
  int s;

  irredundant_cascade_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_sel(input int p, input int b, input int code);
    @(negedge clk);
    sel_we = 1'b1; sel_page = PW'(p); sel_bit = KW'(b); sel_code = SW'(code);
    @(negedge clk) sel_we = 1'b0;
  endtask

  // page p: nr rail bits at address 0.., nz z bits next, nx inputs from x[x0]
  task automatic load_page(input int p, input int nr, input int nz, input int x0,
                           input int nx, input bit last);
    int b = 0;
    $display("page %0d: %0d rails, %0d z, x%0d..x%0d", p, nr, nz, x0, x0 + nx - 1);
    for (int i = 0; i < nr; i++) set_sel(p, b++, i);
    for (int i = 0; i < nz; i++) set_sel(p, b++, ZC + i);
    for (int i = 0; i < nx; i++) set_sel(p, b++, XC + x0 + i);
    while (b < K) set_sel(p, b++, CZERO);
    for (int a = 0; a < 2**K; a++) begin
      logic [K-1:0] av = K'(a);
      int rails = (nr == 0) ? 0 : int'(av[3:0]);
      int zv    = (nz == 0) ? 0 : int'(av[nr +: 2]);
      int cnt   = (rails + $countones(av >> (nr + nz))) % 16;
      @(negedge clk);
      lut_we = 1'b1; lut_page = PW'(p); lut_addr = av;
      lut_data = last ? R'(cnt[zv]) : R'(cnt);
    end
    @(negedge clk) lut_we = 1'b0;
  endtask

  initial begin
    int rem, x0, p;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // build the cascade
    load_page(0, 0, 0, 0, K, 1'b0);
    x0 = K; rem = N_IN - K; p = 1;
    while (rem > K - 6) begin
      int n;
      n = (rem - (K - 6) < K - 4) ? rem - (K - 6) : K - 4;
      load_page(p, 4, 0, x0, n, 1'b0);
      x0 += n; rem -= n; p++;
    end
    load_page(p, 4, 2, x0, rem, 1'b1);
    s = p + 1;
    $display("cascade of %0d pages loaded", s);
    @(negedge clk);
    len_we = 1'b1; len_pages = SL'(s); len_outputs = ML'(M);
    @(negedge clk) len_we = 1'b0;

    for (int i = 0; i < 40; i++) begin
      logic [N_IN-1:0] xv;
      int cycles, cnt;
      logic [M_OUT-1:0] exp_f;
      if (i == 0) xv = '0;
      else if (i == 1) xv = '1;
      else for (int w = 0; w < N_IN / 32; w++) xv[32 * w +: 32] = $urandom;
      @(negedge clk);
      x = xv; start = 1'b1;
      @(negedge clk);
      start = 1'b0; x = ~xv;
      cycles = 1;
      while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
      cnt = $countones(xv) % 16;
      exp_f = '0;
      exp_f[M-1:0] = M'(cnt);
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL x=%0h f=%0h expected %0h", xv, f, exp_f);
      end
      checks++;
      if (cycles != s * M + 3) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cycles, s * M + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
