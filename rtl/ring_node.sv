// ring_node: one core's stage on the invalidation ring, with event injection.
//
// Invalidations start at the bus controller and travel once around the ring;
// every node registers the message in its slot and passes it to the next
// node, so each hop costs one cycle. The node shows a passing invalidation to
// its core's caches (inv_valid/inv_laddr) so they can drop the line.
// Profiling events share the ring at lower priority: only when the incoming
// slot is empty does the node take the head of its event FIFO and send it
// onward in that slot. Event packets from upstream cores are passed on
// untouched, so they reach the bus controller at the end of the ring.
// Invalidations are therefore never delayed or displaced by events.
//
// Counters: inj_cnt counts injected events, wait_cnt counts cycles in which an
// event was waiting but the slot was taken.
//
// Timing: ring_out is registered (one cycle per hop); the FIFO read strobe is
// combinational in the cycle the slot is seen empty. The idle-slot injection
// and invalidation priority follow the published design; the register per
// hop and the snoop port are this design's choices.
module ring_node
  import prof_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ring_msg_t            ring_in,
  output ring_msg_t            ring_out,
  input  logic                 fifo_rd_valid,
  input  event_pkt_t           fifo_rd_data,
  output logic                 fifo_rd_en,
  output logic                 inv_valid,
  output logic [LADDR_W-1:0]   inv_laddr,
  output logic [CNT_W-1:0]     inj_cnt,
  output logic [CNT_W-1:0]     wait_cnt
);
  logic   slot_free;
  inv_pkt_t inv_view;

  assign inv_view   = inv_pkt_t'(ring_in);
  assign slot_free  = (msg_type(ring_in) == MSG_EMPTY);
  assign fifo_rd_en = slot_free && fifo_rd_valid;
  assign inv_valid  = (msg_type(ring_in) == MSG_INV);
  assign inv_laddr  = inv_view.laddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_out <= '0;
      inj_cnt  <= '0;
      wait_cnt <= '0;
    end else begin
      ring_out <= fifo_rd_en ? ring_msg_t'(fifo_rd_data) : ring_in;
      if (fifo_rd_en) inj_cnt <= inj_cnt + 1'b1;
      if (fifo_rd_valid && !slot_free) wait_cnt <= wait_cnt + 1'b1;
    end
  end

  a_inv_passes: assert property (@(posedge clk) disable iff (!rst_n)
    msg_type(ring_in) != MSG_EMPTY |=> ring_out == $past(ring_in));
endmodule
