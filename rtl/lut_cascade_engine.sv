// lut_cascade_engine: one LUT cascade that evaluates a multiple-output
// function through its ECFN.
//
// The function f_0 .. f_{m-1} of the N_IN inputs x is written as the single
// function ECFN(x, z) = OR_j [z == j] f_j(x), decomposed off-line into a
// cascade of s cells of K inputs each.  Cell p is page p of lut_page_mem;
// rail_input_select forms its address from the previous cell's rails, z and
// x; cascade_sequencer steps the pages, one per clock, for z = 0 .. m-1.
// Bit 0 of the last page's word is f_z and is stored in f[z].
//
// Interface:
//   lut_we/lut_page/lut_addr/lut_data    load a LUT word
//   sel_we/sel_page/sel_bit/sel_code     load an address-bit source code
//   len_we/len_pages/len_outputs         load s and m of the loaded function
//   start/x                              x is sampled with start
//   busy/done/f                          f[0..m-1] valid from the done pulse
//                                        until the next start; f[j], j >= m,
//                                        reads 0.
// Timing: done pulses s*m + 2 clocks after the clock edge that takes start.
// Configuration writes while busy are a usage error (asserted).
//
// The cell-per-page cascade, the ECFN evaluation and its s*m evaluation time
// follow the described design; the configuration interface, sampling of x
// and the output register are this design's own choices.
module lut_cascade_engine
  import cascade_pkg::*;
#(
  parameter int unsigned K     = 15,
  parameter int unsigned R     = 14,
  parameter int unsigned N_IN  = 256,
  parameter int unsigned M_OUT = 245,
  parameter int unsigned PAGES = 34,
  localparam int unsigned PW   = (PAGES > 1) ? $clog2(PAGES) : 1,
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned W    = z_width(M_OUT),
  localparam int unsigned SW   = $clog2(num_sources(R, W, N_IN)),
  localparam int unsigned SL   = $clog2(PAGES + 1),
  localparam int unsigned ML   = $clog2(M_OUT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             lut_we,
  input  logic [PW-1:0]    lut_page,
  input  logic [K-1:0]     lut_addr,
  input  logic [R-1:0]     lut_data,
  input  logic             sel_we,
  input  logic [PW-1:0]    sel_page,
  input  logic [KW-1:0]    sel_bit,
  input  logic [SW-1:0]    sel_code,
  input  logic             len_we,
  input  logic [SL-1:0]    len_pages,
  input  logic [ML-1:0]    len_outputs,
  // evaluation
  input  logic             start,
  input  logic [N_IN-1:0]  x,
  output logic             busy,
  output logic             done,
  output logic [M_OUT-1:0] f
);

  logic [SL-1:0]   num_pages;
  logic [ML-1:0]   num_outputs;
  logic [N_IN-1:0] x_q;

  logic            rd_en;
  logic [PW-1:0]   page;
  logic [W-1:0]    z;
  logic            first_page;
  logic            cap_valid;
  logic [W-1:0]    cap_idx;
  logic [K-1:0]    addr;
  logic [R-1:0]    word;
  logic            start_ok;

  assign start_ok = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_pages   <= SL'(1);
      num_outputs <= ML'(1);
      x_q         <= '0;
      f           <= '0;
    end else begin
      if (len_we && !busy) begin
        num_pages   <= len_pages;
        num_outputs <= len_outputs;
      end
      if (start_ok) begin
        x_q <= x;
        f   <= '0;
      end else if (cap_valid && (32'(cap_idx) < M_OUT)) begin
        f[cap_idx] <= word[0];
      end
    end
  end

  cascade_sequencer #(.PAGES(PAGES), .M_OUT(M_OUT)) u_seq (
    .clk, .rst_n,
    .start      (start_ok),
    .num_pages  (num_pages),
    .num_outputs(num_outputs),
    .busy, .done,
    .rd_en, .page, .z, .first_page,
    .cap_valid, .cap_idx
  );

  rail_input_select #(.K(K), .R(R), .W(W), .N_IN(N_IN), .PAGES(PAGES)) u_sel (
    .clk, .rst_n,
    .sel_we, .sel_page, .sel_bit, .sel_code,
    .page,
    .rails_zero(first_page),
    .rails     (word),
    .z,
    .x         (x_q),
    .addr
  );

  lut_page_mem #(.K(K), .R(R), .PAGES(PAGES)) u_mem (
    .clk,
    .wr_en  (lut_we),
    .wr_page(lut_page),
    .wr_addr(lut_addr),
    .wr_data(lut_data),
    .rd_en,
    .rd_page(page),
    .rd_addr(addr),
    .rd_data(word)
  );

  // Configuration must not change under a running evaluation (busy is low
  // during reset, so the property needs no reset qualifier).
  a_no_cfg_while_busy : assert property (
    @(posedge clk) busy |-> !(lut_we || sel_we || len_we)
  ) else $error("configuration write during evaluation");

endmodule
