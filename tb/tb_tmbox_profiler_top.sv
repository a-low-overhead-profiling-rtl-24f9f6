// tb_tmbox_profiler_top: end-to-end test of the profiling system with every
// parameter at its default (8 cores, 1024-entry event FIFOs, 8192-entry PCIe
// FIFO). Cache-FSM hooks, event and JALL instructions and DDR writes are
// driven per core; a host model reads the PCIe FIFO, rebuilds each core's
// absolute event times from the delta timestamps and overflow packets, and
// compares them with the cycles in which the events were raised.
//
// Phases:
//  1. sparse hardware and software events, JALLs and invalidations: exact
//     times, types, data, sender, invalidation snooping at every core;
//  2. a silence of more than 2**20 cycles, then events: overflow packets;
//  3. below the ring's rated load: an invalidation every 3 cycles and one
//     event per core every 16 cycles; the event FIFOs must stay shallow;
//  4. overload with the PCIe FIFO not read: an event per core every 6 cycles
//     plus bursts of simultaneous hooks, so events wait for ring slots, event
//     FIFOs and the PCIe FIFO overflow, and hook events are lost; afterwards
//     every event must be accounted for as received, lost or dropped.
// Each mechanism is counted and a mechanism that never occurred is a failure.
module tb_tmbox_profiler_top;
  import prof_pkg::*;
  localparam int NC = 8;
  localparam logic [5:0] OP_EVENT = 6'b011100, OP_JALL = 6'b011101;

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
  logic pcie_rd_en = 1, pcie_rd_valid;
  logic [MSG_W-1:0] pcie_rd_data;
  logic [13:0] pcie_count, pcie_max;
  logic [15:0] gen_lost_cnt [NC], log_drop_cnt [NC], ovf_evt_cnt [NC], inj_cnt [NC], wait_cnt [NC];
  logic [10:0] fifo_max [NC];
  logic [31:0] ev_cnt, inv_cnt, pcie_drop_cnt;

  tmbox_profiler_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s cyc=%0d", what, cyc);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host model ----------------
  typedef struct { bit sw; bit [3:0] t, d; longint at; } exp_t;
  exp_t   expq [NC][$];
  longint host_base [NC];
  longint last_t [NC];
  bit     exact = 1;
  int     rx_ev [NC], rx_ovf, rx_total;
  int     n_hw = 0, n_sw = 0, n_jall = 0, gen_total = 0;

  always @(posedge clk) if (rst_n && pcie_rd_en && pcie_rd_valid) begin
    event_pkt_t p;
    int c;
    p = event_pkt_t'(pcie_rd_data);
    c = int'(p.cpu);
    rx_total++;
    check(p.mtype == MSG_HWEV || p.mtype == MSG_SWEV, "only events reach the host");
    if (c >= NC) check(0, "sender id in range");
    else if (p.mtype == MSG_HWEV && p.etype == EV_TS_OVF) begin
      host_base[c] += longint'(p.ts) << TS_W;
      rx_ovf++;
    end else begin
      longint t;
      t = host_base[c] + p.ts;
      host_base[c] = t;
      check(t >= last_t[c], "per-core time never goes back");
      last_t[c] = t;
      rx_ev[c]++;
      if (exact) begin
        check(expq[c].size() > 0, "expected event");
        if (expq[c].size() > 0) begin
          exp_t e;
          e = expq[c].pop_front();
          check((p.mtype == MSG_SWEV) == e.sw && p.etype == e.t && p.edata == e.d,
                "event type and data");
          check(t == e.at, "absolute time rebuilt by host");
        end
      end
    end
  end

  // ---------------- invalidation snoop check ----------------
  logic [LADDR_W-1:0] invq [NC][$];
  int inv_seen [NC];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) if (inv_valid[c]) begin
      inv_seen[c]++;
      if (invq[c].size() == 0) check(0, "unexpected invalidation");
      else check(inv_laddr[c] == invq[c].pop_front(), "invalidation address at core");
    end
  end

  // ---------------- stimulus helpers (drive after negedge) ----------------
  task automatic clear_inputs();
    for (int c = 0; c < NC; c++) begin
      hook[c] = '0; abort_cause[c] = '0; ex_valid[c] = 0;
      instr[c] = '0; rs_value[c] = '0; pc[c] = '0;
    end
    ddr_wr_valid = 0;
  endtask

  // raise one hardware event on core c this cycle; extra = cycles of delay
  // expected before the log unit takes it
  task automatic hw_ev(int c, int h, bit [3:0] cause, int extra);
    exp_t e;
    hook[c][h] = 1;
    abort_cause[c] = cause;
    e.sw = 0; e.t = 4'(h); e.d = (h == int'(EV_TX_ABORT)) ? cause : 4'd0;
    e.at = cyc + 1 + extra;
    expq[c].push_back(e);
    n_hw++; gen_total++;
  endtask

  task automatic sw_ev(int c, bit [3:0] t, bit [3:0] d, int extra);
    exp_t e;
    ex_valid[c] = 1;
    instr[c] = {OP_EVENT, 5'd4, 5'd0, 12'h0, t};
    rs_value[c] = {$urandom, d} ;
    e.sw = 1; e.t = t; e.d = d; e.at = cyc + 2 + extra;
    expq[c].push_back(e);
    n_sw++; gen_total++;
  endtask

  task automatic ddr_write();
    logic [LADDR_W-1:0] a;
    a = 28'($urandom);
    ddr_wr_valid = 1; ddr_wr_laddr = a;
    for (int c = 0; c < NC; c++) invq[c].push_back(a);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      host_base[c] = 0; last_t[c] = 0; rx_ev[c] = 0; inv_seen[c] = 0;
    end
    rx_ovf = 0; rx_total = 0;
    clear_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- phase 1: sparse events, JALLs, invalidations ----
    for (int i = 0; i < 16000; i++) begin
      @(negedge clk);
      clear_inputs();
      if (i % 16 == 0) for (int c = 0; c < NC; c++) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 4)      hw_ev(c, $urandom_range(0, N_HOOKS-1), 4'($urandom_range(1, 3)), 0);
        else if (r < 7) sw_ev(c, 4'($urandom), 4'($urandom), 0);
        else if (r == 7) begin
          logic [31:0] p;
          p = {$urandom, 2'b00};
          ex_valid[c] = 1; instr[c] = {OP_JALL, 26'($urandom)}; pc[c] = p;
          @(posedge clk); #1;
          check(link_copy[c] == p + 32'd8, "JALL link copy");
          n_jall++;
          @(negedge clk);
          clear_inputs();
        end
      end
      if (i % 4 == 1 && $urandom_range(0, 1)) ddr_write();   // at most one write every 3 cycles
    end
    @(negedge clk); clear_inputs();
    repeat (200) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      check(expq[c].size() == 0, "phase 1 all events arrived");
      if (expq[c].size() != 0) $display("core %0d left %0d first sw=%0d t=%0d at=%0d rx=%0d", c, expq[c].size(), expq[c][0].sw, expq[c][0].t, expq[c][0].at, rx_ev[c]);
    end

    // ---- phase 2: long silence, then one event per core ----
    repeat ((1 << TS_W) + 1234) @(negedge clk);
    for (int c = 0; c < NC; c++) hw_ev(c, int'(EV_TX_START), 0, 1);  // one cycle behind the overflow packet
    @(negedge clk); clear_inputs();
    repeat (200) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      check(expq[c].size() == 0, "phase 2 events arrived");
      check(ovf_evt_cnt[c] == 16'd1, "one overflow packet per core");
    end

    // ---- phase 3: rated load ----
    for (int i = 0; i < 24000; i++) begin
      @(negedge clk); clear_inputs();
      if (i % 3 == 0) ddr_write();
      for (int c = 0; c < NC; c++)
        if (i % 16 == (c * 16 / NC)) hw_ev(c, (c + i / 12) % N_HOOKS, 4'd1, 0);
    end
    @(negedge clk); clear_inputs();
    repeat (400) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      check(expq[c].size() == 0, "phase 3 events arrived");
      check(fifo_max[c] <= 11'd8, "event FIFO stays shallow at rated load");
    end
    $display("after rated load: fifo_max =%0d %0d %0d %0d %0d %0d %0d %0d",
      fifo_max[0], fifo_max[1], fifo_max[2], fifo_max[3], fifo_max[4], fifo_max[5], fifo_max[6], fifo_max[7]);

    // ---- phase 4: overload, PCIe FIFO not read ----
    exact = 0;
    pcie_rd_en = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk); clear_inputs();
      if (i % 3 == 0) ddr_write();
      for (int c = 0; c < NC; c++)
        if (i % 6 == (c * 6 / NC)) hw_ev(c, (c + i) % N_HOOKS, 4'd2, 0);
      if (i % 1000 < 10) begin          // bursts of simultaneous hooks
        n_hw += N_HOOKS - $countones(hook[NC-1]);
        gen_total += N_HOOKS - $countones(hook[NC-1]);
        hook[NC-1] = '1;
      end
    end
    @(negedge clk); clear_inputs();
    repeat (200) @(negedge clk);
    pcie_rd_en = 1;
    while (pcie_rd_valid) @(negedge clk);
    repeat (50) @(negedge clk);
    while (pcie_rd_valid) @(negedge clk);
    repeat (50) @(negedge clk);
    begin
      int lost, dropped, got, waits;
      lost = 0; dropped = 0; got = 0; waits = 0;
      for (int c = 0; c < NC; c++) begin
        lost += gen_lost_cnt[c]; dropped += log_drop_cnt[c]; got += rx_ev[c]; waits += wait_cnt[c];
        check(inv_seen[c] == int'(inv_cnt) && invq[c].size() == 0, "every core saw every invalidation");
      end
      check(gen_total == got + lost + dropped + int'(pcie_drop_cnt), "every event accounted for");
      check(int'(ev_cnt) == rx_total, "collected = received by host");
      $display("events: generated=%0d received=%0d lost_at_gen=%0d dropped_at_event_fifo=%0d dropped_at_pcie=%0d",
               gen_total, got, lost, dropped, pcie_drop_cnt);
      $display("mechanisms: hw=%0d sw=%0d jall=%0d inv=%0d ring_waits=%0d ovf_pkts=%0d pcie_max=%0d",
               n_hw, n_sw, n_jall, inv_cnt, waits, rx_ovf, pcie_max);
      check(n_hw > 0,  "mechanism: hardware events");
      check(n_sw > 0,  "mechanism: software event instruction");
      check(n_jall > 0, "mechanism: JALL link copy");
      check(inv_cnt > 0, "mechanism: invalidations snooped");
      check(waits > 0, "mechanism: event waits for an idle ring slot");
      check(rx_ovf > 0, "mechanism: timestamp overflow packet");
      check(dropped > 0, "mechanism: event FIFO overflow");
      check(lost > 0, "mechanism: hook repeated while pending");
      check(pcie_drop_cnt > 0 && pcie_max == 14'd8192, "mechanism: PCIe FIFO overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
