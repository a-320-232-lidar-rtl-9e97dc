// column_serializer: sends one line of TDC results over a single serial
// lane, column 0 first, each word MSB first.
//
// A `start` pulse begins a line. In the linearity-boost mode each column
// sends all W bits; in the data-compressive mode only the upper W-LSB_BITS
// bits, since the lower ones are zero by construction (4 bits fewer per
// column: the 12-to-8 bit data reduction). `sync` is high with the first bit
// of a line, `sval` with every bit, and `busy` from start until the last bit
// has gone. The mode is sampled at start.
//
// Interface: clk, rst_n, start, mode, rd_idx/rd_data (to the line buffer),
// sdo, sval, sync, busy. Timing: one bit per clock; a line takes COLS*W
// (mode 1) or COLS*(W-LSB_BITS) (mode 2) cycles after the start cycle.
// One lane, MSB-first order and the sync strobe are this design's choices;
// serial output of the line during the next line follows the sensor
// description.
module column_serializer
#(
  parameter int unsigned COLS     = lidar_pkg::COLS,
  parameter int unsigned W        = lidar_pkg::TDC_BITS,
  parameter int unsigned LSB_BITS = lidar_pkg::LSB_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  lidar_pkg::tdc_mode_e               mode,
  output logic [$clog2(COLS)-1:0] rd_idx,
  input  logic [W-1:0]            rd_data,
  output logic                    sdo,
  output logic                    sval,
  output logic                    sync,
  output logic                    busy
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned BW = $clog2(W + 1);

  logic [$clog2(COLS)-1:0] col;
  logic [BW-1:0]           bit_idx;   // index of the bit being sent
  logic [BW-1:0]           last_bit;  // lowest bit index sent per word
  logic                    first;

  assign rd_idx = col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      col      <= '0;
      bit_idx  <= '0;
      last_bit <= '0;
      first    <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        col      <= '0;
        bit_idx  <= BW'(W - 1);
        last_bit <= (mode == lidar_pkg::MODE_DATA_COMPRESSIVE) ? BW'(LSB_BITS) : '0;
        first    <= 1'b1;
      end
    end else begin
      first <= 1'b0;
      if (bit_idx == last_bit) begin
        bit_idx <= BW'(W - 1);
        if (int'(col) == COLS - 1) busy <= 1'b0;
        else                       col  <= col + 1'b1;
      end else begin
        bit_idx <= bit_idx - 1'b1;
      end
    end
  end

  assign sdo  = busy & rd_data[bit_idx];
  assign sval = busy;
  assign sync = busy & first;

endmodule
