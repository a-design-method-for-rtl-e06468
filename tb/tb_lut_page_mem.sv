// tb_lut_page_mem: self-checking test of the paged LUT store.
//
// Fills every page of a small memory (K=4, R=3, PAGES=3) with random words
// kept in a testbench copy, then reads random pages and addresses and checks
// that each word appears exactly one clock after its read, that rd_data
// holds while rd_en is low, that a read in the cycle of a write returns the
// old word, and that a page number past PAGES reads as 0.
module tb_lut_page_mem;
  localparam int unsigned K = 4, R = 3, PAGES = 3, PW = 2;

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [PW-1:0] wr_page = '0, rd_page = '0;
  logic [K-1:0]  wr_addr = '0, rd_addr = '0;
  logic [R-1:0]  wr_data = '0, rd_data;
  logic [R-1:0]  model [PAGES][2**K];
  int checks = 0, failures = 0;

  lut_page_mem #(.K(K), .R(R), .PAGES(PAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [R-1:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, rd_data, exp);
    end
  endtask

  initial begin
    // load all pages
    for (int p = 0; p < PAGES; p++)
      for (int a = 0; a < 2**K; a++) begin
        model[p][a] = R'($urandom);
        @(negedge clk);
        wr_en = 1'b1; wr_page = PW'(p); wr_addr = K'(a); wr_data = model[p][a];
      end
    @(negedge clk) wr_en = 1'b0;

    // random reads, one-cycle latency
    for (int i = 0; i < 200; i++) begin
      int p, a;
      p = $urandom_range(PAGES - 1);
      a = $urandom_range(2**K - 1);
      rd_en = 1'b1; rd_page = PW'(p); rd_addr = K'(a);
      @(negedge clk);
      check(model[p][a], "read");
    end

    // rd_data holds while rd_en is low
    rd_en = 1'b0; rd_page = 0; rd_addr = 0;
    begin
      logic [R-1:0] held;
      held = rd_data;
      repeat (3) @(negedge clk);
      check(held, "hold");
    end

    // read-during-write returns the old word, then the new one
    begin
      logic [R-1:0] old_w, new_w;
      old_w = model[1][5];
      new_w = ~old_w;
      wr_en = 1'b1; wr_page = 1; wr_addr = 5; wr_data = new_w;
      rd_en = 1'b1; rd_page = 1; rd_addr = 5;
      @(negedge clk);
      check(old_w, "read during write");
      wr_en = 1'b0;
      model[1][5] = new_w;
      @(negedge clk);
      check(new_w, "read after write");
    end

    // page past the end reads 0
    rd_page = PW'(3); rd_addr = 7;
    @(negedge clk);
    check('0, "page out of range");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
