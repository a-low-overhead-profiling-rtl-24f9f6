// sw_event_decode: opcode-decoder extension for the software `event`
// instruction.
//
// The instruction carries the software event type in its immediate field and
// names a source register whose value, taken from the pipeline's bypass
// network (rs_value), supplies the event data. When the execute stage holds
// an event instruction (ex_valid high, opcode equal to EVENT_OPCODE) the unit
// raises sw_valid for one cycle with etype = instr[3:0] and edata =
// rs_value[3:0]; that request goes to the event generation unit, which
// merges it with the hardware events in front of the shared event FIFO. The
// instruction otherwise behaves as a no-op, so each software event costs one
// instruction.
//
// Timing: sw_valid is registered, one cycle after the instruction is in the
// execute stage. The instruction's existence, its 16 event types and the
// operand bypass follow the published design; the opcode value and the field
// positions are this design's choices (the primary opcode is one that the
// MIPS I instruction set leaves unused).
module sw_event_decode
  import prof_pkg::*;
#(
  parameter logic [5:0] EVENT_OPCODE = 6'b011100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ex_valid,   // execute stage holds a live instruction
  input  logic [31:0]        instr,
  input  logic [31:0]        rs_value,   // bypassed value of register instr[25:21]
  output logic               sw_valid,
  output logic [ETYPE_W-1:0] sw_etype,
  output logic [EDATA_W-1:0] sw_edata
);
  logic is_event;
  assign is_event = ex_valid && (instr[31:26] == EVENT_OPCODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_valid <= 1'b0;
      sw_etype <= '0;
      sw_edata <= '0;
    end else begin
      sw_valid <= is_event;
      if (is_event) begin
        sw_etype <= instr[ETYPE_W-1:0];
        sw_edata <= rs_value[EDATA_W-1:0];
      end
    end
  end
endmodule
