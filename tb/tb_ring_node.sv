// tb_ring_node: random ring traffic (idle slots, invalidations, events from
// upstream cores) and a model event FIFO behind the node. Checks each cycle:
// an occupied slot is passed on unchanged one cycle later; an idle slot
// carries the FIFO head when one is waiting and stays idle otherwise; the FIFO
// is read exactly when a slot is used; passing invalidations are shown to the
// caches; and the injection and wait counters.
module tb_ring_node;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0;
  ring_msg_t ring_in = '0, ring_out;
  logic fifo_rd_valid = 0, fifo_rd_en, inv_valid;
  event_pkt_t fifo_rd_data = '0;
  logic [LADDR_W-1:0] inv_laddr;
  logic [15:0] inj_cnt, wait_cnt;
  int checks = 0, failures = 0, m_inj = 0, m_wait = 0;
  ring_msg_t exp_out;
  event_pkt_t q[$];

  ring_node dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      event_pkt_t e;
      inv_pkt_t iv;
      int r;
      // the core adds events to its FIFO now and then
      if ($urandom_range(0, 99) < 30) begin
        e.mtype = MSG_HWEV; e.cpu = 4'd3; e.ts = 20'($urandom);
        e.etype = 4'($urandom); e.edata = 4'($urandom);
        q.push_back(e);
      end
      fifo_rd_valid = q.size() != 0;
      fifo_rd_data  = fifo_rd_valid ? q[0] : '0;
      r = $urandom_range(0, 99);
      if (r < 30) begin
        iv.mtype = MSG_INV; iv.cpu = '1; iv.laddr = 28'($urandom);
        ring_in = ring_msg_t'(iv);
      end else if (r < 45) begin
        ring_in = {MSG_SWEV, 32'($urandom)};
      end else ring_in = '0;
      #1;
      check(inv_valid == (ring_in[33:32] == MSG_INV), "snoop valid");
      if (inv_valid) check(inv_laddr == ring_in[27:0], "snoop address");
      check(fifo_rd_en == (ring_in[33:32] == MSG_EMPTY && q.size() != 0), "read strobe");
      if (ring_in[33:32] != MSG_EMPTY) begin
        exp_out = ring_in;
        if (q.size() != 0) m_wait++;
      end else if (q.size() != 0) begin
        exp_out = ring_msg_t'(q.pop_front());
        m_inj++;
      end else exp_out = '0;
      @(negedge clk);
      check(ring_out == exp_out, "ring out");
      check(inj_cnt == 16'(m_inj) && wait_cnt == 16'(m_wait), "counters");
    end
    check(m_inj > 500 && m_wait > 100, "both paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
