// tb_log_unit: feeds events into the log unit with random gaps, including
// gaps longer than one and two timestamp-counter periods (2**20 cycles), and a
// FIFO that is randomly full for stretches. A host-side decoder rebuilds the
// absolute time of every logged event from the deltas and the overflow
// packets and compares it with the cycle in which the event was accepted.
// Also checked: sender ID, message type (hardware/software), type and data,
// the one-cycle wait while an overflow packet goes first, and the drop count.
module tb_log_unit;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_ready, fifo_wr, fifo_full = 0;
  raw_event_t ev = '0;
  event_pkt_t fifo_data;
  logic [15:0] drop_cnt, ovf_evt_cnt;
  int checks = 0, failures = 0;
  longint cyc = 0, host_t = 0, host_base = 0;
  int drops = 0, ovf_pkts = 0, logged = 0;
  raw_event_t exp_q[$];
  longint exp_t[$];

  log_unit #(.CPU_ID(4'd5)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cyc=%0d", what, cyc); end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host decoder on the FIFO write side
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr) begin
      check(fifo_data.cpu == 4'd5, "sender id");
      if (fifo_data.mtype == MSG_HWEV && fifo_data.etype == EV_TS_OVF) begin
        host_base += longint'(fifo_data.ts) << TS_W;
        ovf_pkts++;
        check(!ev_ready, "event waits behind overflow packet");
      end else begin
        host_t = host_base + fifo_data.ts;
        host_base = host_t;
        check(exp_q.size() > 0, "expected event present");
        if (exp_q.size() > 0) begin
          raw_event_t e; longint t;
          e = exp_q.pop_front(); t = exp_t.pop_front();
          check(fifo_data.mtype == (e.sw ? MSG_SWEV : MSG_HWEV), "msg type");
          check(fifo_data.etype == e.etype && fifo_data.edata == e.edata, "type/data");
          check(host_t == t, "rebuilt absolute time");
        end
        logged++;
      end
    end
  end

  task automatic send(input raw_event_t e);
    ev = e; ev_valid = 1;
    forever begin
      #1;
      if (ev_ready) begin
        if (!fifo_full) begin exp_q.push_back(e); exp_t.push_back(cyc); end
        else drops++;
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    ev_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int gap;
      raw_event_t e;
      gap = $urandom_range(0, 20);
      if (i == 500)  gap = (1 << 20) + 77;        // one wrap
      if (i == 1000) gap = 2 * (1 << 20) + 5;     // two wraps
      if (i == 1500) gap = (1 << 20) - 1;         // just under a wrap
      repeat (gap) @(negedge clk);
      fifo_full = (i % 400) > 350;
      e.sw = 1'($urandom); e.etype = 4'($urandom_range(0, 14)); e.edata = 4'($urandom);
      send(e);
    end
    fifo_full = 0;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all events logged");
    check(ovf_pkts >= 2 && ovf_evt_cnt == 16'(ovf_pkts), "overflow packets");
    check(drops > 0 && drop_cnt == 16'(drops), "drop count");
    $display("logged=%0d ovf_pkts=%0d drops=%0d", logged, ovf_pkts, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
