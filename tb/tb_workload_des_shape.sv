// tb_workload_des_shape: cascades of the size of the largest benchmark
// (DES: 256 inputs, 245 outputs, a 34-cell cascade of 15-input LUTs, and
// cascades of at most 15 cells when its outputs are split into 4 groups).
//
// The benchmark's own LUT contents come from its decomposition, which is
// not available here, so each cell is filled with random words: pages 1..s-1
// read 7 random rails of the previous word plus 8 random x or z variables,
// page 0 reads 15 random x or z variables.  The expected outputs come from a
// testbench model that walks the same tables.
//
// Part A: the default top (one cascade), s = 34, m = 245: 8330 page reads,
// latency 34*245 + 3 clocks checked.
// Part B: a top with GROUPS = 4, each group s = 15, m = 62, 62, 62, 59:
// latency 15*62 + 3 clocks, and the speed-up over part A must exceed 8.
module tb_workload_des_shape;
  localparam int unsigned K = 15, R = 14, N_IN = 256, M_OUT = 245, PAGES = 34;
  localparam int unsigned PW = 6, KW = 4, SW = 9, SL = 6;
  localparam int unsigned XW = 8;             // z width, one cascade
  localparam int unsigned G4 = 4, MG4 = 62, ZW4 = 6;
  localparam int unsigned SA = 34, SB = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lut_we = 1'b0, sel_we = 1'b0, len_we = 1'b0;
  logic start_a = 1'b0, start_b = 1'b0;
  logic [PW-1:0] lut_page = '0, sel_page = '0;
  logic [K-1:0]  lut_addr = '0;
  logic [R-1:0]  lut_data = '0;
  logic [KW-1:0] sel_bit = '0;
  logic [SW-1:0] sel_code = '0;
  logic [SL-1:0] len_pages = '0;
  logic [7:0]    len_outputs = '0;
  logic [1:0]    cfg_group = '0;
  logic [N_IN-1:0] x = '0;
  logic busy_a, done_a, busy_b, done_b;
  logic [M_OUT-1:0] f_a, f_b;
  logic wa, wb;                                // which top a write goes to

  // testbench copies of the tables: 5 cascades (A, then B groups 0..3)
  logic [R-1:0] mem_m [5][PAGES * 2**K];
  int unsigned  tab_m [5][PAGES][K];
  int unsigned  zw_of [5];
  int checks = 0, failures = 0;
  int lat_a, lat_b;

  irredundant_cascade_top dut_a (
    .clk, .rst_n, .cfg_group(1'b0),
    .lut_we(lut_we && wa), .lut_page, .lut_addr, .lut_data,
    .sel_we(sel_we && wa), .sel_page, .sel_bit, .sel_code,
    .len_we(len_we && wa), .len_pages, .len_outputs,
    .start(start_a), .x, .busy(busy_a), .done(done_a), .f(f_a));

  irredundant_cascade_top #(.GROUPS(G4)) dut_b (
    .clk, .rst_n, .cfg_group,
    .lut_we(lut_we && wb), .lut_page, .lut_addr, .lut_data,
    .sel_we(sel_we && wb), .sel_page, .sel_bit, .sel_code,
    .len_we(len_we && wb), .len_pages, .len_outputs(len_outputs[5:0]),
    .start(start_b), .x, .busy(busy_b), .done(done_b), .f(f_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load a random cascade of s pages into cascade c (0 = A, 1..4 = B group c-1)
  task automatic load_random(input int c, input int s, input int zw);
    zw_of[c] = zw;
    wa = (c == 0); wb = (c != 0); cfg_group = 2'(c - 1);
    for (int p = 0; p < s; p++) begin
      for (int b = 0; b < K; b++) begin
        int unsigned code;
        if (p > 0 && b < 7) code = $urandom_range(R - 1);             // rail
        else begin
          code = R + $urandom_range(zw + N_IN - 1);                     // z or x
          if (code >= R + zw) code = code - zw + XW_OF(c);              // x: skip unused z codes
        end
        tab_m[c][p][b] = code;
        @(negedge clk);
        sel_we = 1'b1; sel_page = PW'(p); sel_bit = KW'(b); sel_code = SW'(code);
      end
      for (int a = 0; a < 2**K; a++) begin
        logic [R-1:0] d;
        d = R'($urandom);
        mem_m[c][p * 2**K + a] = d;
        @(negedge clk);
        sel_we = 1'b0; lut_we = 1'b1; lut_page = PW'(p); lut_addr = K'(a); lut_data = d;
      end
      @(negedge clk) lut_we = 1'b0;
    end
  endtask

  // width of z as seen in the source codes of cascade c
  function automatic int unsigned XW_OF(int c);
    return (c == 0) ? XW : ZW4;
  endfunction

  function automatic bit model_out(int c, int s, logic [N_IN-1:0] xv, int j);
    logic [R-1:0] rails;
    logic [7:0]   zv;
    rails = '0; zv = 8'(j);
    for (int p = 0; p < s; p++) begin
      logic [K-1:0] a;
      for (int b = 0; b < K; b++) begin
        int unsigned code;
        code = tab_m[c][p][b];
        if (code < R)                   a[b] = (p == 0) ? 1'b0 : rails[code];
        else if (code < R + XW_OF(c))   a[b] = zv[code - R];
        else                            a[b] = xv[code - R - XW_OF(c)];
      end
      rails = mem_m[c][p * 2**K + int'(a)];
    end
    return rails[0];
  endfunction

  task automatic set_len(input int c, input int s, input int m);
    wa = (c == 0); wb = (c != 0); cfg_group = 2'(c - 1);
    @(negedge clk);
    len_we = 1'b1; len_pages = SL'(s); len_outputs = 8'(m);
    @(negedge clk) len_we = 1'b0;
  endtask

  initial begin
    logic [N_IN-1:0] xv;
    int cycles;
    int m_b [G4];
    m_b = '{62, 62, 62, 59};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- Part A: one cascade, s = 34, m = 245 ----
    load_random(0, SA, XW);
    set_len(0, SA, M_OUT);
    for (int t = 0; t < 3; t++) begin
      for (int w = 0; w < N_IN / 32; w++) xv[32 * w +: 32] = $urandom;
      @(negedge clk);
      x = xv; start_a = 1'b1;
      @(negedge clk);
      start_a = 1'b0; x = ~xv;
      cycles = 1;
      while (!done_a && cycles < 20000) begin @(negedge clk); cycles++; end
      lat_a = cycles;
      checks++;
      if (cycles != SA * M_OUT + 3) begin
        failures++; $display("FAIL A latency %0d expected %0d", cycles, SA * M_OUT + 3);
      end
      for (int j = 0; j < M_OUT; j++) begin
        checks++;
        if (f_a[j] !== model_out(0, SA, xv, j)) begin
          failures++; $display("FAIL A output %0d", j);
        end
      end
    end

    // ---- Part B: four groups, s = 15 each ----
    for (int g = 0; g < G4; g++) begin
      load_random(g + 1, SB, ZW4);
      set_len(g + 1, SB, m_b[g]);
    end
    for (int t = 0; t < 3; t++) begin
      for (int w = 0; w < N_IN / 32; w++) xv[32 * w +: 32] = $urandom;
      @(negedge clk);
      x = xv; start_b = 1'b1;
      @(negedge clk);
      start_b = 1'b0; x = ~xv;
      cycles = 1;
      while (!done_b && cycles < 20000) begin @(negedge clk); cycles++; end
      lat_b = cycles;
      checks++;
      if (cycles != SB * MG4 + 3) begin
        failures++; $display("FAIL B latency %0d expected %0d", cycles, SB * MG4 + 3);
      end
      for (int g = 0; g < G4; g++)
        for (int j = 0; j < m_b[g]; j++) begin
          checks++;
          if (f_b[MG4 * g + j] !== model_out(g + 1, SB, xv, j)) begin
            failures++; $display("FAIL B group %0d output %0d", g, j);
          end
        end
    end
    $display("latency: one cascade %0d clocks, four groups %0d clocks, speed-up %0.2f",
             lat_a, lat_b, real'(lat_a) / real'(lat_b));
    checks++;
    if (lat_a <= 8 * lat_b) begin failures++; $display("FAIL speed-up not above 8"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
