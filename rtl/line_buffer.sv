// line_buffer: holds the 12-bit DCDS results of one line so that they can be
// sent out during the following line while the TDCs convert the next one.
//
// On `load` every column's result is captured in one clock cycle. A column
// whose TDCs saw no event (valid low) is stored as NO_EVENT (all ones), so
// the receiver can tell it from a measured code. The serializer reads one
// word at a time through rd_idx / rd_data (asynchronous read).
//
// Interface: clk, rst_n, load, din/din_valid (all columns), rd_idx, rd_data.
// Timing: one cycle from load to the stored data; TDC results are static by
// the time load is issued (the conversion window is over), so they are taken
// straight from the converter domain.
// The buffer's place in the data path follows the sensor description; the
// parallel load, the read port and the no-event code are this design's.
module line_buffer #(
  parameter int unsigned COLS = lidar_pkg::COLS,
  parameter int unsigned W    = lidar_pkg::TDC_BITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [COLS-1:0][W-1:0]    din,
  input  logic [COLS-1:0]           din_valid,
  input  logic [$clog2(COLS)-1:0]   rd_idx,
  output logic [W-1:0]              rd_data
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [W-1:0] NO_EVENT = '1;

  logic [W-1:0] mem [COLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < COLS; c++) mem[c] <= '0;
    end else if (load) begin
      for (int unsigned c = 0; c < COLS; c++)
        mem[c] <= din_valid[c] ? din[c] : NO_EVENT;
    end
  end

  assign rd_data = (int'(rd_idx) < COLS) ? mem[rd_idx] : '0;

endmodule
