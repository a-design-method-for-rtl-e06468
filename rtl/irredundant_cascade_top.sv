// irredundant_cascade_top: a multiple-output function realised by GROUPS
// LUT cascades evaluated in parallel.
//
// One cascade evaluates m outputs in s*m clocks.  When m is large, the
// output set is partitioned into GROUPS groups, each realised by its own,
// shorter cascade, and the groups run side by side.  Group g produces the
// outputs f[g*MG + j], j = 0 .. m_g-1, with MG = ceil(M_OUT / GROUPS); within
// a group, output j is selected by z = j.  GROUPS = 1 is the single cascade.
//
// Interface:
//   cfg_group selects the engine that the configuration writes (lut_*,
//   sel_*, len_*) go to; see lut_cascade_engine for their meaning.
//   start/x start all groups on the same x; done pulses once, in the clock
//   after the slowest group has finished; f is valid from done until the
//   next start.  busy is high while any group runs.
//
// The output partition into parallel cascades follows the described design;
// the contiguous assignment of outputs to groups and the shared start and
// done are this design's own choices.
module irredundant_cascade_top
  import cascade_pkg::*;
#(
  parameter int unsigned K      = 15,
  parameter int unsigned R      = 14,
  parameter int unsigned N_IN   = 256,
  parameter int unsigned M_OUT  = 245,
  parameter int unsigned PAGES  = 34,
  parameter int unsigned GROUPS = 1,
  localparam int unsigned MG    = (M_OUT + GROUPS - 1) / GROUPS,
  localparam int unsigned GW    = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned PW    = (PAGES > 1) ? $clog2(PAGES) : 1,
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned W     = z_width(MG),
  localparam int unsigned SW    = $clog2(num_sources(R, W, N_IN)),
  localparam int unsigned SL    = $clog2(PAGES + 1),
  localparam int unsigned ML    = $clog2(MG + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic [GW-1:0]    cfg_group,
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

  logic [GROUPS-1:0] g_busy, g_done, g_finished;
  logic [MG-1:0]     g_f [GROUPS];
  logic              running;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic sel_here;
    assign sel_here = (32'(cfg_group) == g);

    lut_cascade_engine #(
      .K(K), .R(R), .N_IN(N_IN), .M_OUT(MG), .PAGES(PAGES)
    ) u_engine (
      .clk, .rst_n,
      .lut_we     (lut_we && sel_here),
      .lut_page, .lut_addr, .lut_data,
      .sel_we     (sel_we && sel_here),
      .sel_page, .sel_bit, .sel_code,
      .len_we     (len_we && sel_here),
      .len_pages, .len_outputs,
      .start      (start && !busy),
      .x,
      .busy       (g_busy[g]),
      .done       (g_done[g]),
      .f          (g_f[g])
    );
  end

  // Gather the group outputs into one vector; bits past M_OUT are dropped.
  always_comb begin
    f = '0;
    for (int g = 0; g < GROUPS; g++)
      for (int j = 0; j < MG; j++)
        if (g * MG + j < M_OUT) f[g * MG + j] = g_f[g][j];
  end

  // done once all groups have reported done since the common start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_finished <= '0;
      running    <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        g_finished <= '0;
        running    <= 1'b1;
      end else if (running) begin
        if (&(g_finished | g_done)) begin
          running    <= 1'b0;
          done       <= 1'b1;
          g_finished <= '0;
        end else begin
          g_finished <= g_finished | g_done;
        end
      end
    end
  end

  assign busy = running || (|g_busy);

endmodule
