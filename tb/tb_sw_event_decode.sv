// tb_sw_event_decode: drives event instructions, other opcodes and bubbles
// into the execute stage and checks that exactly the event instructions raise
// sw_valid one cycle later, with the type from the immediate's low four bits
// and the data from the low four bits of the bypassed rs operand.
module tb_sw_event_decode;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ex_valid = 0;
  logic [31:0] instr = '0, rs_value = '0;
  logic sw_valid;
  logic [ETYPE_W-1:0] sw_etype;
  logic [EDATA_W-1:0] sw_edata;
  int checks = 0, failures = 0, seen = 0;
  bit exp_v; logic [3:0] exp_t, exp_d;

  sw_event_decode dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
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
    exp_v = 0;
    for (int i = 0; i < 2000; i++) begin
      ex_valid = $urandom_range(0, 3) != 0;
      instr    = $urandom;
      if ($urandom_range(0, 1)) instr[31:26] = 6'b011100;   // event opcode
      rs_value = $urandom;
      exp_v = ex_valid && instr[31:26] == 6'b011100;
      exp_t = instr[3:0];
      exp_d = rs_value[3:0];
      @(negedge clk);
      check(sw_valid == exp_v, "sw_valid");
      if (exp_v) begin
        seen++;
        check(sw_etype == exp_t && sw_edata == exp_d, "fields");
      end
    end
    check(seen > 100, "event instructions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
