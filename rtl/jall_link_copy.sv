// jall_link_copy: support for the JALL (jump and link and link) instruction.
//
// JALL behaves like the MIPS JAL instruction and in addition keeps a second
// copy of its return address. Software reads that copy when it later issues
// transactional reads and writes from a library routine, so that the events
// it produces can be tied to the program counter of the call site (the finest
// profiling level). This unit watches the execute stage: for a JALL it writes
// pc + 8 (the return address after the branch delay slot, as JAL does) into
// link_copy; the ordinary link register write is left to the core, which
// treats JALL as a JAL. link_copy is held until the next JALL.
//
// Timing: link_copy is updated at the clock edge that ends the JALL's execute
// cycle. The behaviour follows the published description; the opcode value
// and how software reads link_copy (here a plain read port) are this
// design's choices.
module jall_link_copy #(
  parameter logic [5:0] JALL_OPCODE = 6'b011101
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ex_valid,
  input  logic [31:0] instr,
  input  logic [31:0] pc,          // address of the instruction in execute
  output logic        is_jall,     // tells the core to execute it as JAL
  output logic [31:0] link_copy
);
  assign is_jall = ex_valid && (instr[31:26] == JALL_OPCODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       link_copy <= '0;
    else if (is_jall) link_copy <= pc + 32'd8;
  end
endmodule
