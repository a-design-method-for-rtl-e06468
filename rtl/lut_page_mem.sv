// lut_page_mem: the LUT store of a time-multiplexed cascade.
//
// Every cell of the cascade is a K-input, R-output look-up table.  The
// cells are kept as PAGES pages of one memory, page p holding cell p:
// 2**K words of R bits, the word at address a being the rail values the
// cell sends on when its K inputs are a.  The last cell of a cascade puts
// the function value f in bit 0 of its word.
//
// Interface and timing:
//   wr_en/wr_page/wr_addr/wr_data  configuration write, takes effect at the
//                                  clock edge.
//   rd_en/rd_page/rd_addr          read request; rd_data holds the word one
//                                  clock later and keeps it while rd_en is
//                                  low.  A read of a word written in the same
//                                  cycle returns the old contents.
// There is no reset: the contents are configuration, loaded before use.
//
// The paging of cells in one memory and K = 15 follow the described cascade;
// the rail width R = K-1 (the largest rail count a cell may pass on), the
// synchronous read port and the separate write port are this design's own.
module lut_page_mem #(
  parameter int unsigned K     = 15,
  parameter int unsigned R     = 14,
  parameter int unsigned PAGES = 34,
  localparam int unsigned PW   = (PAGES > 1) ? $clog2(PAGES) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [PW-1:0] wr_page,
  input  logic [K-1:0]  wr_addr,
  input  logic [R-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [PW-1:0] rd_page,
  input  logic [K-1:0]  rd_addr,
  output logic [R-1:0]  rd_data
);

  // Page p, address a is word p * 2**K + a.
  logic [R-1:0] mem [PAGES * 2**K];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_page) < PAGES)) mem[{wr_page, wr_addr}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (32'(rd_page) < PAGES) rd_data <= mem[{rd_page, rd_addr}];
      else                      rd_data <= '0;
    end
  end

endmodule
