// Cell buffer of the input port.
//
// A simple dual-port memory of DEPTH cells of L bits. The scheduler writes
// a scheduled cell at write address aw (we high) and, in the time slot it
// gave that cell, reads it at read address ar (re high). The read is
// synchronous: cell_to_crossbar and cell_valid appear the clock after re.
// A write and a read of the same address in one clock return the old
// contents.
//
// From the document: the buffer between scheduler and crossbar with write
// address AW and read address AR. Its depth and the read latency are this
// design's choices.
module cell_buffer #(
  parameter int unsigned L     = 256,  // cell length in bits
  parameter int unsigned DEPTH = 64    // cells
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] aw,
  input  logic [L-1:0]             scheduled_cell,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] ar,
  output logic [L-1:0]             cell_to_crossbar,
  output logic                     cell_valid
);

  logic [L-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[aw] <= scheduled_cell;
    if (re) cell_to_crossbar <= mem[ar];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cell_valid <= 1'b0;
    else        cell_valid <= re;
  end

endmodule
