// log_unit: timestamps events and enqueues them in the core's event FIFO.
//
// The unit keeps a TS_W-bit counter of the cycles since the last event it
// logged. An accepted event becomes a packet whose timestamp field is that
// counter value (delta encoding), after which the counter restarts. With 20
// bits the deltas span about a million cycles. When the counter wraps the
// unit counts the wrap; before the next event is logged it first enqueues an
// overflow event (hardware type EV_TS_OVF) whose timestamp field holds the
// number of wraps, so the host can rebuild absolute times exactly:
//   t(event) = t(previous event) + wraps * 2**TS_W + delta.
// While such an overflow packet is being written ev_ready is low for one
// cycle and the event waits in the event generation unit.
//
// If the event FIFO is full the event is dropped, counted in drop_cnt, and
// the counter keeps running, so later deltas stay correct relative to the
// last event that was actually logged.
//
// Interface: ev_valid/ev_ready/ev from the event generation unit, fifo_wr/
// fifo_data/fifo_full to the event FIFO. Timing: an event accepted in cycle
// n is written at the edge ending cycle n and carries the counter value of
// cycle n. Delta encoding, the 20-bit field and the overflow event follow the
// published design; dropping on a full FIFO is this design's choice.
module log_unit
  import prof_pkg::*;
#(
  parameter logic [CPU_W-1:0] CPU_ID = '0,
  parameter int unsigned      DROP_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ev_valid,
  input  raw_event_t        ev,
  output logic              ev_ready,
  output logic              fifo_wr,
  output event_pkt_t        fifo_data,
  input  logic              fifo_full,
  output logic [DROP_W-1:0] drop_cnt,
  output logic [15:0]       ovf_evt_cnt     // overflow packets written
);
  logic [TS_W-1:0] delta, ovf;
  logic            wrap, send_ovf, send_ev;

  assign wrap     = (delta == '1);
  assign send_ovf = ev_valid && (ovf != '0) && !fifo_full;
  // The event is taken when it can be written, or dropped when the FIFO is
  // full; it waits only while an overflow packet goes first.
  assign ev_ready = (ovf == '0) || fifo_full;
  assign send_ev  = ev_valid && (ovf == '0) && !fifo_full;

  always_comb begin
    fifo_wr   = send_ovf || send_ev;
    fifo_data = '0;
    fifo_data.cpu = CPU_ID;
    if (send_ovf) begin
      fifo_data.mtype = MSG_HWEV;
      fifo_data.ts    = ovf;
      fifo_data.etype = EV_TS_OVF;
    end else begin
      fifo_data.mtype = ev.sw ? MSG_SWEV : MSG_HWEV;
      fifo_data.ts    = delta;
      fifo_data.etype = ev.etype;
      fifo_data.edata = ev.edata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delta       <= '0;
      ovf         <= '0;
      drop_cnt    <= '0;
      ovf_evt_cnt <= '0;
    end else begin
      if (send_ev) begin
        delta <= TS_W'(1);
      end else begin
        delta <= delta + 1'b1;
      end
      if (send_ovf) begin
        ovf         <= wrap ? TS_W'(1) : '0;
        ovf_evt_cnt <= ovf_evt_cnt + 1'b1;
      end else if (wrap && !send_ev && ovf != '1) begin
        ovf <= ovf + 1'b1;
      end
      if (ev_valid && fifo_full) drop_cnt <= drop_cnt + 1'b1;
    end
  end

  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(send_ovf && send_ev));
endmodule
