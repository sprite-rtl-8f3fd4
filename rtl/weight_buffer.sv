// weight_buffer: the slice of the global weight buffer dedicated to one PE.
//
// Holds the PE's weights already compressed offline: each row is ROW_SLOTS
// non-zero weights (value, input-channel index inside the chunk, local
// output channel) plus a flag marking the last row of an input-channel
// chunk. Within a chunk the rows list output channel 0's non-zeros in
// increasing channel index, then output channel 1's, and so on, packed
// without gaps; unused slots are invalid. The chunks follow each other in
// order. The PE reads one full row per cycle, which refills its IMU weight
// buffer every cycle.
//
// Capacity: ROWS = 256 rows of 32 slots of 28 bits (28 KB per PE, 896 KB
// for 32 PEs). The paper gives only the 1691 KB total of activation plus
// weight buffers; the split is this design's choice. Double buffering is
// left to the loader: the write port is independent of the read port, so
// one part of the buffer can be refilled while another is read.
//
// Interface: wr_en writes one slot; a write to slot 0 also writes the row's
// last flag. ren captures row raddr into rdata/rlast at the next edge
// (one cycle latency); with ren low the outputs hold.
module weight_buffer
  import sprite_pkg::*;
#(
  parameter int unsigned ROWS      = 256,
  parameter int unsigned ROW_SLOTS = IMU_COL
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(ROWS)-1:0]      wr_row,
  input  logic [$clog2(ROW_SLOTS)-1:0] wr_slot,
  input  w_entry_t                     wr_entry,
  input  logic                         wr_last,
  input  logic                         ren,
  input  logic [$clog2(ROWS)-1:0]      raddr,
  output w_entry_t [ROW_SLOTS-1:0]     rdata,
  output logic                         rlast
);

  w_entry_t mem [ROWS][ROW_SLOTS];
  logic     last_mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[wr_row][wr_slot] <= wr_entry;
      if (wr_slot == '0) last_mem[wr_row] <= wr_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
      rlast <= 1'b0;
    end else if (ren) begin
      for (int s = 0; s < ROW_SLOTS; s++) rdata[s] <= mem[raddr][s];
      rlast <= last_mem[raddr];
    end
  end

endmodule
