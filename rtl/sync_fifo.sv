// sync_fifo: single-clock first-in first-out buffer, used both as the
// per-core event FIFO and as the large PCIe output FIFO.
//
// The storage is a plain array, so an FPGA tool maps it to block RAM (the
// per-core event FIFO is sized as one 36 Kb block: 1024 x 34 bits). The head
// entry is shown ahead: rd_data is valid whenever rd_valid is high, and a
// read (rd_en with rd_valid) removes it at the clock edge. A write while full
// is ignored and a read while empty is ignored; callers check full/rd_valid.
// count gives the occupancy and max_count the largest occupancy seen since
// reset, which shows how close the buffer came to overflowing.
// Latency: an entry written in cycle n is readable in cycle n+1.
// Depths are this design's choices; the published system only gives the
// block-RAM budget.
module sync_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] max_count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_valid = (count != '0);
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && rd_valid;
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      max_count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
      if (count > max_count) max_count <= count;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH+1))'(DEPTH));
endmodule
