// core_profiler: the profiling hardware attached to one processor core.
//
// It chains the units that follow the path of an event inside a core:
// the event-instruction decoder and the cache-FSM hooks feed the event
// generation unit; the log unit timestamps each event and writes it into the
// core's event FIFO; the ring node empties that FIFO into idle slots of the
// invalidation ring. The JALL link-copy register sits beside the decoder.
// Nothing here stalls the core: hardware events cost no instructions and a
// software event costs the one event instruction.
//
// Interface: hook pulses and abort cause from the cache FSM, the execute-stage
// instruction, its bypassed rs operand and PC from the pipeline, the ring
// slot in and out, the invalidation snoop towards the caches, and counters
// for lost, dropped, injected and waiting events and the FIFO's high-water
// mark. Timing: a hook becomes a FIFO entry two cycles later at the earliest
// and can enter the ring the cycle after that.
module core_profiler
  import prof_pkg::*;
#(
  parameter logic [CPU_W-1:0] CPU_ID     = '0,
  parameter int unsigned      FIFO_DEPTH = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_HOOKS-1:0]   hook,
  input  logic [EDATA_W-1:0]   abort_cause,
  input  logic [N_HOOKS-1:0]   hw_enable,
  input  logic                 sw_enable,
  input  logic                 ex_valid,
  input  logic [31:0]          instr,
  input  logic [31:0]          rs_value,
  input  logic [31:0]          pc,
  output logic                 is_jall,
  output logic [31:0]          link_copy,
  input  ring_msg_t            ring_in,
  output ring_msg_t            ring_out,
  output logic                 inv_valid,
  output logic [LADDR_W-1:0]   inv_laddr,
  output logic [15:0]          gen_lost_cnt,
  output logic [15:0]          log_drop_cnt,
  output logic [15:0]          ovf_evt_cnt,
  output logic [15:0]          inj_cnt,
  output logic [15:0]          wait_cnt,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_max
);
  logic               sw_valid;
  logic [ETYPE_W-1:0] sw_etype;
  logic [EDATA_W-1:0] sw_edata;
  logic               ev_valid, ev_ready;
  raw_event_t         ev;
  logic               fifo_wr, fifo_full, fifo_rd_en, fifo_rd_valid;
  event_pkt_t         fifo_wdata, fifo_rdata;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  sw_event_decode u_dec (
    .clk, .rst_n, .ex_valid, .instr, .rs_value,
    .sw_valid, .sw_etype, .sw_edata
  );

  jall_link_copy u_jall (
    .clk, .rst_n, .ex_valid, .instr, .pc, .is_jall, .link_copy
  );

  event_gen u_gen (
    .clk, .rst_n, .hook, .abort_cause, .hw_enable, .sw_enable,
    .sw_valid, .sw_etype, .sw_edata,
    .ev_valid, .ev, .ev_ready, .lost_cnt(gen_lost_cnt)
  );

  log_unit #(.CPU_ID(CPU_ID)) u_log (
    .clk, .rst_n, .ev_valid, .ev, .ev_ready,
    .fifo_wr, .fifo_data(fifo_wdata), .fifo_full,
    .drop_cnt(log_drop_cnt), .ovf_evt_cnt
  );

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd_en), .rd_data(fifo_rdata), .rd_valid(fifo_rd_valid),
    .count(fifo_count), .max_count(fifo_max)
  );

  ring_node u_node (
    .clk, .rst_n, .ring_in, .ring_out,
    .fifo_rd_valid, .fifo_rd_data(fifo_rdata), .fifo_rd_en,
    .inv_valid, .inv_laddr, .inj_cnt, .wait_cnt
  );
endmodule
