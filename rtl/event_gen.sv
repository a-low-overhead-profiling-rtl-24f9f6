// event_gen: event generation unit of one core.
//
// The cache FSM raises a one-cycle hook pulse for each transactional state
// change of interest (tx start, tx read, tx write, tx invalidation, tx abort,
// lock bus, unlock bus, tx commit); the event-instruction decoder raises
// sw_valid with a software event type and data. This unit works beside the
// cache FSM and never stalls it: each hook sets a pending bit (the abort cause
// and the software event data are latched with it), and every cycle the
// lowest-numbered pending hardware event, or else the pending software event,
// is offered to the log unit through a valid/ready pair. A hook that fires
// again while its previous event is still pending is counted in lost_cnt (one count per lost event).
//
// hw_enable and sw_enable select the profiling level (for example software
// events only, hardware events only, or both), one bit per hardware event.
//
// Timing: a hook in cycle n is offered in cycle n+1 at the earliest. Events
// raised in the same cycle leave one per cycle, so they are timestamped a
// few cycles apart. The set of hooks follows the published design; the
// pending-bit scheme, the priority order and the enable mask are this
// design's choices.
module event_gen
  import prof_pkg::*;
#(
  parameter int unsigned LOST_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_HOOKS-1:0]   hook,        // bit i = hw_event_e'(i)
  input  logic [EDATA_W-1:0]   abort_cause, // with hook[EV_TX_ABORT]
  input  logic [N_HOOKS-1:0]   hw_enable,
  input  logic                 sw_enable,
  input  logic                 sw_valid,
  input  logic [ETYPE_W-1:0]   sw_etype,
  input  logic [EDATA_W-1:0]   sw_edata,
  output logic                 ev_valid,
  output raw_event_t           ev,
  input  logic                 ev_ready,
  output logic [LOST_W-1:0]    lost_cnt
);
  localparam int unsigned ABORT_IDX = int'(EV_TX_ABORT);

  logic [N_HOOKS-1:0] pend, grant_hw, new_hw;
  logic [EDATA_W-1:0] abort_data;
  logic               sw_pend, grant_sw, new_sw;
  logic [ETYPE_W-1:0] sw_type_q;
  logic [EDATA_W-1:0] sw_data_q;
  logic [LOST_W-1:0]  lost_now;

  assign new_hw = hook & hw_enable;
  assign new_sw = sw_valid && sw_enable;

  // Fixed priority: lowest pending hardware event, then the software event.
  always_comb begin
    grant_hw = '0;
    grant_sw = 1'b0;
    ev       = '0;
    ev_valid = (pend != '0) || sw_pend;
    for (int i = N_HOOKS - 1; i >= 0; i--) begin
      if (pend[i]) begin
        grant_hw = '0;
        grant_hw[i] = ev_ready;
        ev.sw    = 1'b0;
        ev.etype = ETYPE_W'(i);
        ev.edata = (i == int'(EV_TX_ABORT)) ? abort_data : '0;
      end
    end
    if (pend == '0 && sw_pend) begin
      grant_sw = ev_ready;
      ev.sw    = 1'b1;
      ev.etype = sw_type_q;
      ev.edata = sw_data_q;
    end
  end

  always_comb begin
    lost_now = '0;
    for (int i = 0; i < N_HOOKS; i++)
      if (new_hw[i] && pend[i] && !grant_hw[i]) lost_now = lost_now + 1'b1;
    if (new_sw && sw_pend && !grant_sw) lost_now = lost_now + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      sw_pend    <= 1'b0;
      abort_data <= '0;
      sw_type_q  <= '0;
      sw_data_q  <= '0;
      lost_cnt   <= '0;
    end else begin
      pend <= (pend & ~grant_hw) | new_hw;
      if (new_hw[ABORT_IDX] && !(pend[ABORT_IDX] && !grant_hw[ABORT_IDX]))
        abort_data <= abort_cause;
      if (new_sw && !(sw_pend && !grant_sw)) begin
        sw_pend   <= 1'b1;
        sw_type_q <= sw_etype;
        sw_data_q <= sw_edata;
      end else if (grant_sw) begin
        sw_pend   <= 1'b0;
      end
      lost_cnt <= lost_cnt + lost_now;
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({grant_hw, grant_sw}));
endmodule
