// tb_sync_fifo: self-checking test of the FIFO at a small depth (8).
// Random writes and reads are compared with a queue model: data order,
// count, full, rd_valid, the high-water mark, and the rule that a write while
// full and a read while empty are ignored.
module tb_sync_fifo;
  localparam int W = 34, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, rd_valid;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count, max_count;
  int checks = 0, failures = 0, model_max = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(count == q.size(), "count");
      check(full == (q.size() == D), "full");
      check(rd_valid == (q.size() != 0), "rd_valid");
      check(max_count == model_max, "max_count");
      if (q.size() != 0) check(rd_data == q[0], "head data");
      // phases: fill-biased, drain-biased, mixed
      wr_en   = ($urandom_range(0, 99) < ((i / 500) % 2 == 0 ? 70 : 30));
      rd_en   = ($urandom_range(0, 99) < ((i / 500) % 2 == 0 ? 30 : 70));
      wr_data = {$urandom, $urandom} ;
      @(posedge clk);
      if (q.size() > model_max) model_max = q.size();
      begin
        bit can_rd, can_wr;
        can_rd = rd_en && q.size() != 0;
        can_wr = wr_en && q.size() != D;
        if (can_rd) void'(q.pop_front());
        if (can_wr) q.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
