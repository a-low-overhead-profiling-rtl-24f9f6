// tb_pcie_fifo: the FIFO at the PCIe output depth (8192 entries). It is
// filled until full, checked to hold exactly 8192 entries and to ignore a
// further write, then drained while the read order and count are checked.
module tb_pcie_fifo;
  localparam int W = 34, D = 8192;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, rd_valid;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count, max_count;
  int checks = 0, failures = 0, n;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] pat(input int i);
    return W'(i) * 34'h0_9E37_79B1 ^ W'(i);
  endfunction

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
    n = 0;
    while (!full) begin
      wr_en = 1; wr_data = pat(n);
      @(negedge clk);
      n++;
    end
    check(n == D, "accepts exactly DEPTH entries");
    check(count == D, "count at full");
    wr_data = '1;
    @(negedge clk);
    wr_en = 0;
    check(count == D, "write while full ignored");
    for (int i = 0; i < D; i++) begin
      check(rd_valid && rd_data == pat(i), "drain order");
      rd_en = 1;
      @(negedge clk);
    end
    rd_en = 0;
    check(!rd_valid && count == 0, "empty after drain");
    check(max_count == D, "high-water mark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
