// cascade_sequencer: walks a time-multiplexed cascade through all outputs.
//
// A multiple-output function (f_0 .. f_{m-1}) is held as its ECFN, so the
// cascade gives one output per pass, f_j being the value with the auxiliary
// variables z = j.  A pass reads pages 0 .. s-1 in order, one page per clock,
// each page's address using the word the previous page returned.  Passes
// for j = 0 .. m-1 follow back to back, so an evaluation takes s*m read
// cycles, which is the s*m evaluation time of a cascade with m outputs.
//
// Timing: start is taken in the idle state together with num_pages (s,
// 1..PAGES) and num_outputs (m, 1..M_OUT).  From the next cycle rd_en is high
// for s*m cycles, with page and z naming the read.  One cycle after the read
// of the last page of pass j, cap_valid is high with cap_idx = j: the memory
// word then holds f_j in bit 0.  done pulses in the cycle after the last
// capture; busy is high from start to done.  Out-of-range s or m are
// clamped to 1..PAGES and 1..M_OUT.
//
// The output-by-output order and the s*m cycle count follow the described
// evaluation; the state machine and the one-read-per-cycle schedule are
// this design's own.
module cascade_sequencer
  import cascade_pkg::*;
#(
  parameter int unsigned PAGES = 34,
  parameter int unsigned M_OUT = 245,
  localparam int unsigned PW   = (PAGES > 1) ? $clog2(PAGES) : 1,
  localparam int unsigned W    = z_width(M_OUT),
  localparam int unsigned SL   = $clog2(PAGES + 1),
  localparam int unsigned ML   = $clog2(M_OUT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SL-1:0] num_pages,
  input  logic [ML-1:0] num_outputs,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output logic [PW-1:0] page,
  output logic [W-1:0]  z,
  output logic          first_page,
  output logic          cap_valid,
  output logic [W-1:0]  cap_idx
);

  seq_state_e  state;
  logic [PW-1:0] last_page;
  logic [W-1:0]  last_out;
  logic          prev_last;   // previous read was the last page of a pass
  logic [W-1:0]  prev_z;

  logic [PW-1:0] s_clamped;
  logic [W-1:0]  m_clamped;

  always_comb begin
    if (num_pages == 0)                s_clamped = '0;
    else if (32'(num_pages) > PAGES)   s_clamped = PW'(PAGES - 1);
    else                               s_clamped = PW'(num_pages - 1);
    if (num_outputs == 0)              m_clamped = '0;
    else if (32'(num_outputs) > M_OUT) m_clamped = W'(M_OUT - 1);
    else                               m_clamped = W'(num_outputs - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SEQ_IDLE;
      page      <= '0;
      z         <= '0;
      last_page <= '0;
      last_out  <= '0;
      prev_last <= 1'b0;
      prev_z    <= '0;
      done      <= 1'b0;
    end else begin
      done      <= 1'b0;
      prev_last <= 1'b0;
      case (state)
        SEQ_IDLE: begin
          if (start) begin
            state     <= SEQ_RUN;
            page      <= '0;
            z         <= '0;
            last_page <= s_clamped;
            last_out  <= m_clamped;
          end
        end
        SEQ_RUN: begin
          prev_last <= (page == last_page);
          prev_z    <= z;
          if (page == last_page) begin
            page <= '0;
            if (z == last_out) state <= SEQ_DRAIN;
            else               z     <= z + 1'b1;
          end else begin
            page <= page + 1'b1;
          end
        end
        SEQ_DRAIN: begin
          state <= SEQ_IDLE;
          done  <= 1'b1;
        end
        default: state <= SEQ_IDLE;
      endcase
    end
  end

  assign rd_en      = (state == SEQ_RUN);
  assign first_page = (page == '0);
  assign busy       = (state != SEQ_IDLE);
  assign cap_valid  = prev_last;
  assign cap_idx    = prev_z;

endmodule
