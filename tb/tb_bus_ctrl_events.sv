// tb_bus_ctrl_events: DDR writes at random spacing of at least three cycles,
// and random messages returning on the ring. Checks that each write puts an
// invalidation with its line address on the ring the next cycle (an idle slot
// otherwise), that returning events and only events are pushed into the PCIe
// FIFO, that returning invalidations are retired, and that events meeting a
// full PCIe FIFO are dropped and counted.
module tb_bus_ctrl_events;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ddr_wr_valid = 0, pcie_wr, pcie_full = 0;
  logic [LADDR_W-1:0] ddr_wr_laddr = '0;
  ring_msg_t ring_out, ring_in = '0, pcie_data, exp_out;
  logic [31:0] ev_cnt, inv_cnt, pcie_drop_cnt;
  int checks = 0, failures = 0, m_ev = 0, m_inv = 0, m_drop = 0, gap = 0;

  bus_ctrl_events dut (.*);
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
    gap = 3;
    for (int i = 0; i < 5000; i++) begin
      bit is_ev;
      int r;
      ddr_wr_valid = (gap >= 2) && $urandom_range(0, 1);
      ddr_wr_laddr = 28'($urandom);
      gap = ddr_wr_valid ? 0 : gap + 1;
      r = $urandom_range(0, 3);
      ring_in = {r[1:0], 32'($urandom)};
      pcie_full = (i % 1000) > 900;
      #1;
      is_ev = (r == 2 || r == 3);
      check(pcie_wr == (is_ev && !pcie_full), "pcie write");
      if (pcie_wr) check(pcie_data == ring_in, "pcie data");
      if (is_ev && !pcie_full) m_ev++;
      if (is_ev && pcie_full) m_drop++;
      exp_out = ddr_wr_valid ? {MSG_INV, 4'hF, ddr_wr_laddr} : '0;
      if (ddr_wr_valid) m_inv++;
      @(negedge clk);
      check(ring_out == exp_out, "ring out");
      check(ev_cnt == 32'(m_ev) && inv_cnt == 32'(m_inv) && pcie_drop_cnt == 32'(m_drop), "counters");
    end
    check(m_drop > 0 && m_inv > 500, "paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
