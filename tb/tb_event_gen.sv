// tb_event_gen: drives random hook pulses, abort causes, software events,
// enable masks and back-pressure (ev_ready) into the event generation unit
// and compares every cycle with a reference model of its rules: one pending
// event per hook, lowest-numbered hardware event first, software event last,
// abort cause carried in the data field, masked events ignored, and a hook
// that repeats while still pending counted as lost. A directed part checks
// that an abort with a given cause comes out with that cause.
module tb_event_gen;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_HOOKS-1:0] hook = '0, hw_enable = '1;
  logic [EDATA_W-1:0] abort_cause = '0;
  logic sw_enable = 1, sw_valid = 0;
  logic [ETYPE_W-1:0] sw_etype = '0;
  logic [EDATA_W-1:0] sw_edata = '0;
  logic ev_valid, ev_ready = 1;
  raw_event_t ev;
  logic [15:0] lost_cnt;
  int checks = 0, failures = 0, accepted = 0;

  // reference model state
  bit [N_HOOKS-1:0] mp;
  bit [3:0] mabort, mswt, mswd;
  bit msw;
  int mlost;

  event_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one model step; call after inputs are driven, before the clock edge
  task automatic step();
    int g;
    bit gsw;
    bit [N_HOOKS-1:0] nh;
    bit nsw;
    g = -1; gsw = 0;
    for (int i = 0; i < N_HOOKS; i++) if (mp[i] && g < 0) g = i;
    check(ev_valid == (mp != 0 || msw), "valid");
    if (g >= 0) begin
      check(ev.sw == 0 && ev.etype == 4'(g) &&
            ev.edata == ((g == int'(EV_TX_ABORT)) ? mabort : 4'd0), "hw event");
    end else if (msw) begin
      check(ev.sw == 1 && ev.etype == mswt && ev.edata == mswd, "sw event");
    end
    if (!ev_ready) g = -1;
    else if (g < 0 && msw) gsw = 1;
    if (ev_valid && ev_ready) accepted++;
    nh  = hook & hw_enable;
    nsw = sw_valid && sw_enable;
    for (int i = 0; i < N_HOOKS; i++) begin
      bit busy;
      busy = mp[i] && g != i;
      if (nh[i] && busy) mlost++;
      if (i == int'(EV_TX_ABORT) && nh[i] && !busy) mabort = abort_cause;
      mp[i] = (mp[i] && g != i) || nh[i];
    end
    if (nsw && msw && !gsw) mlost++;
    else if (nsw) begin msw = 1; mswt = sw_etype; mswd = sw_edata; end
    else if (gsw) msw = 0;
  endtask

  initial begin
    mp = 0; msw = 0; mlost = 0; mabort = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // directed: one abort with a capacity cause
    hook = '0; hook[EV_TX_ABORT] = 1; abort_cause = ABORT_CAPACITY;
    step(); @(negedge clk);
    hook = '0;
    check(ev_valid && ev.etype == EV_TX_ABORT && ev.edata == ABORT_CAPACITY && !ev.sw,
          "abort cause delivered next cycle");
    step(); @(negedge clk);
    // random
    for (int i = 0; i < 20000; i++) begin
      for (int h = 0; h < N_HOOKS; h++) hook[h] = ($urandom_range(0, 99) < 6);
      abort_cause = 4'($urandom);
      sw_valid = ($urandom_range(0, 99) < 15);
      sw_etype = 4'($urandom); sw_edata = 4'($urandom);
      ev_ready = ($urandom_range(0, 99) < 80);
      if (i % 5000 == 4000) hw_enable = 8'($urandom);
      if (i % 5000 == 0)    hw_enable = '1;
      sw_enable = (i % 7000) < 6000;
      step();
      @(negedge clk);
      check(lost_cnt == 16'(mlost), "lost count");
    end
    check(accepted > 5000, "events delivered");
    check(mlost > 0, "lost path exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
