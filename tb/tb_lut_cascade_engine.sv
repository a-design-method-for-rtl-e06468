// tb_lut_cascade_engine: self-checking test of one LUT cascade.
//
// Small engine: K=5, R=4, N_IN=10, M_OUT=4, PAGES=3.
//
// Part 1 is the three-page cascade of a 10-input function: page 0 reads
// x0..x4 and passes three rails (the count of ones, 0..5); page 1 reads those
// rails with x5, x6 and passes two rails (the count modulo 3); page 2 reads
// the two rails with x7..x9 and gives f = 1 when the count of ones of x is a
// multiple of 3.  All 1024 inputs are applied and f is compared with the
// count taken directly from x.
//
// Part 2 fills the pages with random words and every address bit with a
// random source (rails, z, x or constant) and runs multiple-output
// evaluations (m = 4, then m = 3 with s = 2); the expected outputs come from
// a testbench model of the cascade that walks the pages for each z = j.
// Every evaluation also checks that done comes s*m + 2 clocks after start.
module tb_lut_cascade_engine;
  localparam int unsigned K = 5, R = 4, N_IN = 10, M_OUT = 4, PAGES = 3;
  localparam int unsigned W = 2, PW = 2, KW = 3, SW = 5, SL = 2, ML = 3;
  localparam int unsigned XC = R + W;   // code of x0

  logic clk = 1'b0, rst_n = 1'b0;
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

  logic [R-1:0] mem_m [PAGES][2**K];
  int unsigned  tab_m [PAGES][K];
  int checks = 0, failures = 0;

  lut_cascade_engine #(.K(K), .R(R), .N_IN(N_IN), .M_OUT(M_OUT), .PAGES(PAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input int p, input int a, input logic [R-1:0] d);
    @(negedge clk);
    lut_we = 1'b1; lut_page = PW'(p); lut_addr = K'(a); lut_data = d;
    mem_m[p][a] = d;
    @(negedge clk) lut_we = 1'b0;
  endtask

  task automatic write_sel(input int p, input int b, input int code);
    @(negedge clk);
    sel_we = 1'b1; sel_page = PW'(p); sel_bit = KW'(b); sel_code = SW'(code);
    tab_m[p][b] = code;
    @(negedge clk) sel_we = 1'b0;
  endtask

  task automatic set_len(input int s, input int m);
    @(negedge clk);
    len_we = 1'b1; len_pages = SL'(s); len_outputs = ML'(m);
    @(negedge clk) len_we = 1'b0;
  endtask

  // start one evaluation, wait for done, check the latency
  task automatic evaluate(input logic [N_IN-1:0] xv, input int s, input int m);
    int cycles;
    @(negedge clk);
    x = xv; start = 1'b1;
    @(negedge clk);
    start = 1'b0; x = ~xv;      // x must have been sampled
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != s * m + 2) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, s * m + 2);
    end
  endtask

  function automatic logic [M_OUT-1:0] model(logic [N_IN-1:0] xv, int s, int m);
    logic [M_OUT-1:0] res = '0;
    for (int j = 0; j < m; j++) begin
      logic [R-1:0] rails = '0;
      logic [W-1:0] zv = W'(j);
      for (int p = 0; p < s; p++) begin
        logic [K-1:0] a;
        for (int b = 0; b < K; b++) begin
          int unsigned c = tab_m[p][b];
          if (c < R)               a[b] = (p == 0) ? 1'b0 : rails[c];
          else if (c < R + W)      a[b] = zv[c - R];
          else if (c < XC + N_IN)  a[b] = xv[c - XC];
          else                     a[b] = 1'b0;
        end
        rails = mem_m[p][a];
      end
      res[j] = rails[0];
    end
    return res;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- Part 1: count of ones of x0..x9 is a multiple of 3 ----
    for (int b = 0; b < 5; b++) write_sel(0, b, XC + b);        // x0..x4
    for (int b = 0; b < 3; b++) write_sel(1, b, b);             // y0..y2
    write_sel(1, 3, XC + 5); write_sel(1, 4, XC + 6);           // x5, x6
    write_sel(2, 0, 0); write_sel(2, 1, 1);                     // y3, y4
    for (int b = 2; b < 5; b++) write_sel(2, b, XC + 5 + b);    // x7..x9
    for (int a = 0; a < 2**K; a++) begin
      logic [K-1:0] av;
      av = K'(a);
      write_word(0, a, R'($countones(av)));
      write_word(1, a, R'((int'(av[2:0]) + av[3] + av[4]) % 3));
      write_word(2, a, R'(((int'(av[1:0]) + av[2] + av[3] + av[4]) % 3) == 0));
    end
    set_len(3, 1);
    for (int xi = 0; xi < 2**N_IN; xi++) begin
      logic [N_IN-1:0] xv;
      xv = N_IN'(xi);
      evaluate(xv, 3, 1);
      checks++;
      if (f !== M_OUT'(($countones(xv) % 3) == 0)) begin
        failures++;
        $display("FAIL mod3 x=%0h f=%0h", xv, f);
      end
    end

    // ---- Part 2: random cascades, multiple outputs through z ----
    for (int round = 0; round < 4; round++) begin
      int s, m;
      s = (round % 2 == 0) ? 3 : 2;
      m = (round % 2 == 0) ? 4 : 3;
      for (int p = 0; p < PAGES; p++) begin
        for (int b = 0; b < K; b++) write_sel(p, b, $urandom_range(XC + N_IN));
        for (int a = 0; a < 2**K; a++) write_word(p, a, R'($urandom));
      end
      // at least one z bit must matter
      write_sel(s - 1, 0, R);
      set_len(s, m);
      for (int i = 0; i < 100; i++) begin
        logic [N_IN-1:0] xv;
        xv = N_IN'($urandom);
        evaluate(xv, s, m);
        checks++;
        if (f !== model(xv, s, m)) begin
          failures++;
          $display("FAIL random s=%0d m=%0d x=%0h f=%0h expected %0h", s, m, xv, f,
                   model(xv, s, m));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
