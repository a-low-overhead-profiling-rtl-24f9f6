// tmbox_profiler_top: event profiling for a ring-connected multicore with
// hybrid transactional memory.
//
// N_CORES copies of the per-core profiling hardware (core_profiler) sit on the
// invalidation ring together with the bus controller's ring end
// (bus_ctrl_events). Invalidations leave the bus controller, visit core 0,
// core 1, ... core N-1 and return; an event injected by core k rides the
// remaining hops to the bus controller, which pushes it into the PCIe output
// FIFO. The PCIe endpoint, the processor cores, their caches and the DDR
// controller are outside this module: their signals are the ports.
//
// Ports, per core c (arrays indexed by c): hook[c] and abort_cause[c] from the
// cache FSM; ex_valid[c], instr[c], rs_value[c], pc[c] from the pipeline's
// execute stage; is_jall[c] and link_copy[c] back to it; inv_valid[c] and
// inv_laddr[c] to the caches. Shared: hw_enable/sw_enable select the
// profiling level, ddr_wr_valid/ddr_wr_laddr report DDR writes (at most one
// every three cycles), and pcie_rd_* is the read side of the PCIe FIFO for
// the endpoint. The remaining outputs are statistics counters.
//
// Timing: a hook in cycle n reaches core c's FIFO in cycle n+2 at the
// earliest, enters the ring in the next idle slot at core c and reaches the
// PCIe FIFO N_CORES-c cycles later. The ring order and the event path follow
// the published 8-core system; FIFO depths are this design's choices.
module tmbox_profiler_top
  import prof_pkg::*;
#(
  parameter int unsigned N_CORES         = 8,
  parameter int unsigned EVENT_FIFO_DEPTH = 1024,
  parameter int unsigned PCIE_FIFO_DEPTH  = 8192
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_HOOKS-1:0]   hook        [N_CORES],
  input  logic [EDATA_W-1:0]   abort_cause [N_CORES],
  input  logic [N_HOOKS-1:0]   hw_enable,
  input  logic                 sw_enable,
  input  logic                 ex_valid    [N_CORES],
  input  logic [31:0]          instr       [N_CORES],
  input  logic [31:0]          rs_value    [N_CORES],
  input  logic [31:0]          pc          [N_CORES],
  output logic                 is_jall     [N_CORES],
  output logic [31:0]          link_copy   [N_CORES],
  output logic                 inv_valid   [N_CORES],
  output logic [LADDR_W-1:0]   inv_laddr   [N_CORES],
  input  logic                 ddr_wr_valid,
  input  logic [LADDR_W-1:0]   ddr_wr_laddr,
  input  logic                 pcie_rd_en,
  output logic [MSG_W-1:0]     pcie_rd_data,
  output logic                 pcie_rd_valid,
  output logic [$clog2(PCIE_FIFO_DEPTH+1)-1:0] pcie_count,
  output logic [$clog2(PCIE_FIFO_DEPTH+1)-1:0] pcie_max,
  output logic [15:0]          gen_lost_cnt [N_CORES],
  output logic [15:0]          log_drop_cnt [N_CORES],
  output logic [15:0]          ovf_evt_cnt  [N_CORES],
  output logic [15:0]          inj_cnt      [N_CORES],
  output logic [15:0]          wait_cnt     [N_CORES],
  output logic [$clog2(EVENT_FIFO_DEPTH+1)-1:0] fifo_max [N_CORES],
  output logic [31:0]          ev_cnt,
  output logic [31:0]          inv_cnt,
  output logic [31:0]          pcie_drop_cnt
);
  ring_msg_t ring [N_CORES+1];   // ring[c] enters core c, ring[N_CORES] returns
  logic      pcie_wr, pcie_full;
  ring_msg_t pcie_wdata;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    core_profiler #(
      .CPU_ID    (CPU_W'(c)),
      .FIFO_DEPTH(EVENT_FIFO_DEPTH)
    ) u_core (
      .clk, .rst_n,
      .hook(hook[c]), .abort_cause(abort_cause[c]),
      .hw_enable, .sw_enable,
      .ex_valid(ex_valid[c]), .instr(instr[c]), .rs_value(rs_value[c]), .pc(pc[c]),
      .is_jall(is_jall[c]), .link_copy(link_copy[c]),
      .ring_in(ring[c]), .ring_out(ring[c+1]),
      .inv_valid(inv_valid[c]), .inv_laddr(inv_laddr[c]),
      .gen_lost_cnt(gen_lost_cnt[c]), .log_drop_cnt(log_drop_cnt[c]),
      .ovf_evt_cnt(ovf_evt_cnt[c]), .inj_cnt(inj_cnt[c]), .wait_cnt(wait_cnt[c]),
      .fifo_max(fifo_max[c])
    );
  end

  bus_ctrl_events u_ctrl (
    .clk, .rst_n,
    .ddr_wr_valid, .ddr_wr_laddr,
    .ring_out(ring[0]), .ring_in(ring[N_CORES]),
    .pcie_wr, .pcie_data(pcie_wdata), .pcie_full,
    .ev_cnt, .inv_cnt, .pcie_drop_cnt
  );

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(PCIE_FIFO_DEPTH)) u_pcie_fifo (
    .clk, .rst_n,
    .wr_en(pcie_wr), .wr_data(pcie_wdata), .full(pcie_full),
    .rd_en(pcie_rd_en), .rd_data(pcie_rd_data), .rd_valid(pcie_rd_valid),
    .count(pcie_count), .max_count(pcie_max)
  );
endmodule
