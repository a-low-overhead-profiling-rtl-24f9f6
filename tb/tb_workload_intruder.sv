// tb_workload_intruder: replays a transaction mix shaped like the Intruder
// benchmark (4 threads, 410 committed transactions) through the whole
// profiling system, once for each of four TM configurations: STM only,
// hybrid TM with a 16-line TM cache, and hybrid TM with a 64-line TM cache
// with commit-time and with encounter-time locking. The software/hardware
// commit and abort counts per configuration are the published ones
// (SW commits/aborts, HW commits/aborts): 410/22 0/0, 211/15 199/226,
// 11/8 399/81, 10/5 400/117.
//
// Each hardware transaction raises tx start, 1-4 tx read/write hooks and
// then either lock bus, tx commit, unlock bus or a tx abort with a cause.
// Each software transaction issues event instructions with the software
// codes used here (0 start, 1 commit, 2 abort, 3 read, 4 write). DDR writes
// send invalidations around the ring meanwhile. A host model decodes the
// PCIe FIFO at the rate of the 8 MB/s host link and must count exactly the
// table's commits and aborts per class. Nothing may be lost or dropped; the
// PCIe FIFO's high-water mark shows how much of it the bursts use.
module tb_workload_intruder;
  import prof_pkg::*;
  localparam int NC = 8, NT = 4;
  localparam logic [5:0] OP_EVENT = 6'b011100;

  logic clk = 0, rst_n = 0;
  logic [N_HOOKS-1:0] hook [NC];
  logic [EDATA_W-1:0] abort_cause [NC];
  logic [N_HOOKS-1:0] hw_enable = '1;
  logic sw_enable = 1;
  logic ex_valid [NC];
  logic [31:0] instr [NC], rs_value [NC], pc [NC];
  logic is_jall [NC];
  logic [31:0] link_copy [NC];
  logic inv_valid [NC];
  logic [LADDR_W-1:0] inv_laddr [NC];
  logic ddr_wr_valid = 0;
  logic [LADDR_W-1:0] ddr_wr_laddr = '0;
  logic pcie_rd_en = 0, pcie_rd_valid;
  logic [MSG_W-1:0] pcie_rd_data;
  logic [13:0] pcie_count, pcie_max;
  logic [15:0] gen_lost_cnt [NC], log_drop_cnt [NC], ovf_evt_cnt [NC], inj_cnt [NC], wait_cnt [NC];
  logic [10:0] fifo_max [NC];
  logic [31:0] ev_cnt, inv_cnt, pcie_drop_cnt;

  tmbox_profiler_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PCIe endpoint model: 8 MB/s at a 50 MHz clock is 0.16 bytes per cycle;
  // with a packet sent as 8 bytes the link takes one packet every 50 cycles.
  localparam int PCIE_CYCLES_PER_PKT = 50;
  int pcie_timer = 0;
  always @(negedge clk) begin
    pcie_timer = (pcie_timer == PCIE_CYCLES_PER_PKT - 1) ? 0 : pcie_timer + 1;
    pcie_rd_en = (pcie_timer == 0);
  end

  // host decoder: commit/abort counts per class
  int sw_cm, sw_ab, hw_cm, hw_ab, n_events;
  always @(posedge clk) if (rst_n && pcie_rd_en && pcie_rd_valid) begin
    event_pkt_t p;
    p = event_pkt_t'(pcie_rd_data);
    n_events++;
    if (p.mtype == MSG_SWEV) begin
      if (p.etype == 4'd1) sw_cm++;
      if (p.etype == 4'd2) sw_ab++;
    end else if (p.mtype == MSG_HWEV) begin
      if (p.etype == EV_TX_COMMIT) hw_cm++;
      if (p.etype == EV_TX_ABORT)  hw_ab++;
    end
  end

  // background DDR writes, one every 3 to 8 cycles
  bit traffic = 0;
  initial forever begin
    @(negedge clk);
    ddr_wr_valid = 0;
    if (traffic) begin
      ddr_wr_valid = 1; ddr_wr_laddr = 28'($urandom);
      @(negedge clk); ddr_wr_valid = 0;
      repeat ($urandom_range(1, 6)) @(negedge clk);
    end
  end

  typedef struct { bit hw; bit commit; } tx_t;
  tx_t work [NT][$];

  task automatic sw_event(int c, bit [3:0] t);
    ex_valid[c] = 1; instr[c] = {OP_EVENT, 5'd8, 5'd0, 12'h0, t}; rs_value[c] = $urandom;
    @(negedge clk);
    ex_valid[c] = 0; instr[c] = '0;
    repeat (3) @(negedge clk);
  endtask

  task automatic hw_hook(int c, hw_event_e h, bit [3:0] cause);
    hook[c][h] = 1; abort_cause[c] = cause;
    @(negedge clk);
    hook[c] = '0;
    repeat (3) @(negedge clk);
  endtask

  task automatic run_thread(int c);
    while (work[c].size() != 0) begin
      tx_t t;
      int n;
      t = work[c].pop_front();
      n = $urandom_range(1, 4);
      if (t.hw) begin
        hw_hook(c, EV_TX_START, 0);
        repeat (n) hw_hook(c, $urandom_range(0, 1) ? EV_TX_READ : EV_TX_WRITE, 0);
        if (t.commit) begin
          hw_hook(c, EV_LOCK_BUS, 0);
          hw_hook(c, EV_TX_COMMIT, 0);
          hw_hook(c, EV_UNLOCK_BUS, 0);
        end else hw_hook(c, EV_TX_ABORT, 4'($urandom_range(1, 3)));
      end else begin
        sw_event(c, 4'd0);
        repeat (n) sw_event(c, $urandom_range(0, 1) ? 4'd3 : 4'd4);
        sw_event(c, t.commit ? 4'd1 : 4'd2);
      end
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
  endtask

  task automatic run_config(string name, int swc, int swa, int hwc, int hwa);
    tx_t all [$];
    tx_t t;
    for (int i = 0; i < swc; i++) begin t.hw = 0; t.commit = 1; all.push_back(t); end
    for (int i = 0; i < swa; i++) begin t.hw = 0; t.commit = 0; all.push_back(t); end
    for (int i = 0; i < hwc; i++) begin t.hw = 1; t.commit = 1; all.push_back(t); end
    for (int i = 0; i < hwa; i++) begin t.hw = 1; t.commit = 0; all.push_back(t); end
    all.shuffle();
    foreach (all[i]) work[i % NT].push_back(all[i]);
    sw_cm = 0; sw_ab = 0; hw_cm = 0; hw_ab = 0; n_events = 0;
    traffic = 1;
    fork
      run_thread(0);
      run_thread(1);
      run_thread(2);
      run_thread(3);
    join
    traffic = 0;
    while (pcie_rd_valid) @(negedge clk);
    repeat (100) @(negedge clk);
    $display("%s: SW %0d/%0d HW %0d/%0d events=%0d", name, sw_cm, sw_ab, hw_cm, hw_ab, n_events);
    check(sw_cm == swc && sw_ab == swa, {name, ": software commits/aborts"});
    check(hw_cm == hwc && hw_ab == hwa, {name, ": hardware commits/aborts"});
    check(sw_cm + hw_cm == 410, {name, ": 410 committed transactions"});
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      hook[c] = '0; abort_cause[c] = '0; ex_valid[c] = 0;
      instr[c] = '0; rs_value[c] = '0; pc[c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_config("STM-only",        410, 22,   0,   0);
    run_config("HybridTM-16",     211, 15, 199, 226);
    run_config("HybridTM-64-CTL",  11,  8, 399,  81);
    run_config("HybridTM-64-ETL",  10,  5, 400, 117);
    for (int c = 0; c < NC; c++)
      check(gen_lost_cnt[c] == 0 && log_drop_cnt[c] == 0, "nothing lost in the cores");
    check(pcie_drop_cnt == 0, "nothing dropped at the PCIe FIFO");
    $display("PCIe FIFO high-water mark: %0d of 8192", pcie_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
