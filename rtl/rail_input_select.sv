// rail_input_select: builds the address of the page being read.
//
// A cascade cell sees the rails of the cell before it and a few new
// variables.  Because the output-select variables z of the ECFN may sit
// anywhere in the variable order, mixed with the primary inputs x, every
// address bit of every page is taken from a programmable source:
//
//   code 0 .. R-1              rail bit (word of the previous page)
//   code R .. R+W-1            auxiliary variable z[code-R]
//   code R+W .. R+W+N_IN-1     primary input x[code-R-W]
//   any larger code            constant 0 (unused address bit)
//
// The select table (PAGES x K codes) is written one code per cycle through
// sel_we/sel_page/sel_bit/sel_code and is cleared to constant 0 by reset.
// The address itself is combinational from page, rails, z and x.  When
// rails_zero is high (the first page of a cascade) rail bits read as 0, so a
// first page that selects a rail sees a defined value.
//
// That the address of each cell is made of rails and newly introduced
// variables follows the described cascade; the fully programmable per-bit
// selection, its code layout and the rails_zero masking are this design's
// own choices.
module rail_input_select
  import cascade_pkg::*;
#(
  parameter int unsigned K     = 15,
  parameter int unsigned R     = 14,
  parameter int unsigned W     = 8,
  parameter int unsigned N_IN  = 256,
  parameter int unsigned PAGES = 34,
  localparam int unsigned PW   = (PAGES > 1) ? $clog2(PAGES) : 1,
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned NSRC = num_sources(R, W, N_IN),
  localparam int unsigned SW   = $clog2(NSRC)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration of the select table
  input  logic            sel_we,
  input  logic [PW-1:0]   sel_page,
  input  logic [KW-1:0]   sel_bit,
  input  logic [SW-1:0]   sel_code,
  // address formation
  input  logic [PW-1:0]   page,
  input  logic            rails_zero,
  input  logic [R-1:0]    rails,
  input  logic [W-1:0]    z,
  input  logic [N_IN-1:0] x,
  output logic [K-1:0]    addr
);

  localparam logic [SW-1:0] CODE_ZERO = SW'(NSRC - 1);

  logic [SW-1:0]   sel_tab [PAGES][K];
  logic [NSRC-1:0] sources;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < PAGES; p++)
        for (int b = 0; b < K; b++)
          sel_tab[p][b] <= CODE_ZERO;
    end else if (sel_we && (32'(sel_page) < PAGES) && (32'(sel_bit) < K)) begin
      sel_tab[sel_page][sel_bit] <= sel_code;
    end
  end

  assign sources = {1'b0, x, z, rails_zero ? R'(0) : rails};

  always_comb begin
    addr = '0;
    if (32'(page) < PAGES) begin
      for (int b = 0; b < K; b++) begin
        if (32'(sel_tab[page][b]) < NSRC) addr[b] = sources[sel_tab[page][b]];
      end
    end
  end

endmodule
