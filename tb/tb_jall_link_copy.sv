// tb_jall_link_copy: checks that a JALL in the execute stage stores pc + 8 in
// the link copy, that other instructions and bubbles leave it unchanged, and
// that is_jall marks exactly the JALL instructions.
module tb_jall_link_copy;
  logic clk = 0, rst_n = 0, ex_valid = 0, is_jall;
  logic [31:0] instr = '0, pc = '0, link_copy, exp_copy;
  int checks = 0, failures = 0, jalls = 0;

  jall_link_copy dut (.*);
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
    exp_copy = 0;
    for (int i = 0; i < 2000; i++) begin
      ex_valid = $urandom_range(0, 3) != 0;
      instr = $urandom;
      case ($urandom_range(0, 2))
        0: instr[31:26] = 6'b011101;   // JALL
        1: instr[31:26] = 6'b000011;   // plain JAL
        default: ;
      endcase
      pc = {$urandom, 2'b00};
      #1;
      check(is_jall == (ex_valid && instr[31:26] == 6'b011101), "is_jall");
      @(negedge clk);
      if (ex_valid && instr[31:26] == 6'b011101) begin
        exp_copy = pc + 8;
        jalls++;
      end
      check(link_copy == exp_copy, "link copy");
    end
    check(jalls > 100, "JALLs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
