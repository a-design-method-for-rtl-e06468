// tb_rail_input_select: self-checking test of the page address selection.
//
// Uses K=5, R=4, W=2, N_IN=10, PAGES=3.  Checks that after reset every
// address bit reads constant 0, then programs random source codes for every
// page and bit (rails, z, x and out-of-range codes) and compares the address
// with one computed from the testbench's copy of the table, for random rails,
// z and x, with and without rails_zero.
module tb_rail_input_select;
  localparam int unsigned K = 5, R = 4, W = 2, N_IN = 10, PAGES = 3;
  localparam int unsigned PW = 2, KW = 3, NSRC = R + W + N_IN + 1, SW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sel_we = 1'b0;
  logic [PW-1:0] sel_page = '0, page = '0;
  logic [KW-1:0] sel_bit = '0;
  logic [SW-1:0] sel_code = '0;
  logic rails_zero = 1'b0;
  logic [R-1:0] rails = '0;
  logic [W-1:0] z = '0;
  logic [N_IN-1:0] x = '0;
  logic [K-1:0] addr;
  int unsigned tab [PAGES][K];
  int checks = 0, failures = 0;

  rail_input_select #(.K(K), .R(R), .W(W), .N_IN(N_IN), .PAGES(PAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] expect_addr(int p, logic rz, logic [R-1:0] r,
                                               logic [W-1:0] zz, logic [N_IN-1:0] xx);
    logic [K-1:0] a;
    for (int b = 0; b < K; b++) begin
      int unsigned c;
      c = tab[p][b];
      if (c < R)                a[b] = rz ? 1'b0 : r[c];
      else if (c < R + W)       a[b] = zz[c - R];
      else if (c < R + W + N_IN) a[b] = xx[c - R - W];
      else                      a[b] = 1'b0;
    end
    return a;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // after reset: all bits constant 0
    for (int p = 0; p < PAGES; p++) begin
      page = PW'(p); rails = '1; z = '1; x = '1;
      #1;
      checks++;
      if (addr !== '0) begin failures++; $display("FAIL reset page %0d addr %0h", p, addr); end
    end
    // program random codes, also codes past the last source
    for (int p = 0; p < PAGES; p++)
      for (int b = 0; b < K; b++) begin
        tab[p][b] = $urandom_range(NSRC + 3);
        @(negedge clk);
        sel_we = 1'b1; sel_page = PW'(p); sel_bit = KW'(b); sel_code = SW'(tab[p][b]);
      end
    @(negedge clk) sel_we = 1'b0;
    // make sure page 0 bit 0 is a rail, page 1 bit 1 a z and page 2 bit 2 an x
    tab[0][0] = 1; tab[1][1] = R + 1; tab[2][2] = R + W + 7;
    @(negedge clk);
    sel_we = 1'b1; sel_page = 0; sel_bit = 0; sel_code = SW'(tab[0][0]);
    @(negedge clk);
    sel_page = 1; sel_bit = 1; sel_code = SW'(tab[1][1]);
    @(negedge clk);
    sel_page = 2; sel_bit = 2; sel_code = SW'(tab[2][2]);
    @(negedge clk) sel_we = 1'b0;

    for (int i = 0; i < 400; i++) begin
      int p;
      p = $urandom_range(PAGES - 1);
      page = PW'(p);
      rails_zero = ($urandom_range(3) == 0);
      rails = R'($urandom); z = W'($urandom); x = N_IN'($urandom);
      #1;
      checks++;
      if (addr !== expect_addr(p, rails_zero, rails, z, x)) begin
        failures++;
        $display("FAIL page %0d addr %0h expected %0h", p, addr,
                 expect_addr(p, rails_zero, rails, z, x));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
