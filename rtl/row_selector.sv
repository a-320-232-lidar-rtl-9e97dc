// row_selector: one-hot row select for line-by-line scanning of the pixel
// array.
//
// A one-hot pointer moves one row per `advance` and returns to row 0 on
// `first`. The selected row's pixels drive the column lines only while `en`
// is high (the exposure and conversion part of the line).
//
// Interface: clk, rst_n, first, advance, en, row_sel (ROWS bits, one-hot or
// zero), row_idx (binary index of the pointer). Timing: the pointer moves on
// the clock edge after first/advance.
// Sequential scanning of the 232 lines follows the sensor description; the
// one-hot shift register and the enable are this design's.
module row_selector #(
  parameter int unsigned ROWS = lidar_pkg::ROWS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    first,
  input  logic                    advance,
  input  logic                    en,
  output logic [ROWS-1:0]         row_sel,
  output logic [$clog2(ROWS)-1:0] row_idx
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [ROWS-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr     <= ROWS'(1);
      row_idx <= '0;
    end else if (first) begin
      ptr     <= ROWS'(1);
      row_idx <= '0;
    end else if (advance) begin
      ptr     <= {ptr[ROWS-2:0], ptr[ROWS-1]};
      row_idx <= (int'(row_idx) == ROWS - 1) ? '0 : row_idx + 1'b1;
    end
  end

  assign row_sel = en ? ptr : '0;

endmodule
