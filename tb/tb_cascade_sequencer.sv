// tb_cascade_sequencer: self-checking test of the page/output sequencer.
//
// PAGES=5, M_OUT=6.  For several (s, m), including the extremes and
// out-of-range values that must clamp, it starts one evaluation and checks:
// the reads come as (page 0..s-1) for z = 0..m-1, one per clock with no gap;
// first_page marks page 0; a capture of index j follows one clock after the
// last page of pass j; done pulses once, s*m + 2 clocks after the start
// edge; busy covers the run.
module tb_cascade_sequencer;
  localparam int unsigned PAGES = 5, M_OUT = 6, PW = 3, W = 3, SL = 3, ML = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [SL-1:0] num_pages = '0;
  logic [ML-1:0] num_outputs = '0;
  logic busy, done, rd_en, first_page, cap_valid;
  logic [PW-1:0] page;
  logic [W-1:0] z, cap_idx;
  int checks = 0, failures = 0;

  cascade_sequencer #(.PAGES(PAGES), .M_OUT(M_OUT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run(input int s_req, input int m_req);
    int s, m, rd_count, cap_count, cycles, prev_rd_page, prev_rd_z;
    bit prev_last, seen_done;
    s = (s_req == 0) ? 1 : (s_req > PAGES ? PAGES : s_req);
    m = (m_req == 0) ? 1 : (m_req > M_OUT ? M_OUT : m_req);
    @(negedge clk);
    num_pages = SL'(s_req); num_outputs = ML'(m_req); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    num_pages = '0; num_outputs = '0;   // must have been sampled
    rd_count = 0; cap_count = 0; cycles = 1; prev_last = 0; seen_done = 0;
    while (!seen_done && cycles < 1000) begin
      // checks on the current cycle's outputs
      checks++;
      if (!busy && !done) fail($sformatf("busy low at cycle %0d", cycles));
      if (prev_last) begin
        checks++;
        if (!cap_valid || cap_idx != W'(prev_rd_z))
          fail($sformatf("capture missing/wrong: valid %0b idx %0d exp %0d",
                         cap_valid, cap_idx, prev_rd_z));
        cap_count++;
      end else if (cap_valid) fail("unexpected capture");
      prev_last = 0;
      if (rd_en) begin
        checks++;
        if (int'(page) != rd_count % s || int'(z) != rd_count / s)
          fail($sformatf("read %0d: page %0d z %0d", rd_count, page, z));
        checks++;
        if (first_page != (page == 0)) fail("first_page");
        prev_last = (int'(page) == s - 1);
        prev_rd_z = int'(z);
        rd_count++;
      end
      if (done) begin
        seen_done = 1;
        checks++;
        if (cycles != s * m + 2)
          fail($sformatf("s=%0d m=%0d: done after %0d cycles, expected %0d",
                         s, m, cycles, s * m + 2));
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (rd_count != s * m || cap_count != m || !seen_done)
      fail($sformatf("s=%0d m=%0d: %0d reads, %0d captures, done %0b",
                     s, m, rd_count, cap_count, seen_done));
    checks++;
    if (busy || done) fail("not idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1, 1);
    run(3, 4);
    run(5, 6);
    run(2, 1);
    run(1, 6);
    run(0, 0);   // clamps to 1, 1
    run(7, 7);   // clamps to 5, 6
    for (int i = 0; i < 10; i++) run($urandom_range(1, PAGES), $urandom_range(1, M_OUT));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
