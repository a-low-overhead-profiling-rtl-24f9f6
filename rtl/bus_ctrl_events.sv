// bus_ctrl_events: the bus controller's end of the invalidation ring.
//
// Each write the DDR controller performs (ddr_wr_valid with its cache-line
// address) becomes an invalidation message that the controller places on the
// ring towards the first core; the DDR controller can do this at most once
// every three cycles, which the assertion below checks. A message arriving
// back from the last core is consumed here: an invalidation has completed its
// trip and is retired, and an event packet is pushed into the PCIe output
// FIFO for transfer to the host. The ring cannot be stalled, so an event that
// finds the PCIe FIFO full is dropped and counted in pcie_drop_cnt.
//
// Timing: ring_out is registered; an event arriving in cycle n is written
// into the PCIe FIFO at the edge ending cycle n. The collection point and the
// invalidation source follow the published design; the controller's own ID in
// the sender field (all ones) and the drop counter are this design's choices.
module bus_ctrl_events
  import prof_pkg::*;
#(
  parameter int unsigned MIN_INV_GAP = 3,
  parameter int unsigned CNT_W       = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ddr_wr_valid,
  input  logic [LADDR_W-1:0]   ddr_wr_laddr,
  output ring_msg_t            ring_out,     // to the first core
  input  ring_msg_t            ring_in,      // from the last core
  output logic                 pcie_wr,
  output ring_msg_t            pcie_data,
  input  logic                 pcie_full,
  output logic [CNT_W-1:0]     ev_cnt,       // events collected
  output logic [CNT_W-1:0]     inv_cnt,      // invalidations issued
  output logic [CNT_W-1:0]     pcie_drop_cnt
);
  logic is_event;
  inv_pkt_t inv_msg;

  assign is_event  = (msg_type(ring_in) == MSG_HWEV) || (msg_type(ring_in) == MSG_SWEV);
  assign pcie_wr   = is_event && !pcie_full;
  assign pcie_data = ring_in;

  always_comb begin
    inv_msg.mtype = MSG_INV;
    inv_msg.cpu   = '1;
    inv_msg.laddr = ddr_wr_laddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_out      <= '0;
      ev_cnt        <= '0;
      inv_cnt       <= '0;
      pcie_drop_cnt <= '0;
    end else begin
      ring_out <= ddr_wr_valid ? ring_msg_t'(inv_msg) : '0;
      if (ddr_wr_valid)         inv_cnt       <= inv_cnt + 1'b1;
      if (pcie_wr)              ev_cnt        <= ev_cnt + 1'b1;
      if (is_event && pcie_full) pcie_drop_cnt <= pcie_drop_cnt + 1'b1;
    end
  end

  // The DDR controller issues at most one write every MIN_INV_GAP cycles.
  a_inv_rate: assert property (@(posedge clk) disable iff (!rst_n)
    ddr_wr_valid |=> !ddr_wr_valid [*MIN_INV_GAP-1]);
endmodule
