// act_buffer: the global activation buffer, shared by all PEs.
//
// Split into BANKS banks, one per IMU row. Bank r holds, for every tile of
// BANKS output pixels, the compressed input activations of the tile's r-th
// pixel: for each input-channel chunk a list of non-zero (value, channel
// index) entries whose final entry has 'last' set (a pixel with no non-zero
// in a chunk has a single entry with valid = 0 and last = 1). Lists are
// stored tile by tile and chunk by chunk, so the controller reads every
// bank with a simple incrementing pointer. For a convolution with a kernel
// larger than 1x1 the loader lays the lists out per output pixel
// (im2col order), the reduction chunks then running over kernel position
// and input channel.
//
// Capacity: 7 banks x 40448 entries x 23 bits = 795 KB, which with the
// 896 KB of weight buffers gives the 1691 KB of global buffers in the paper;
// the split and the layout are this design's choices.
//
// Interface: one write port for the loader; per bank a read port with one
// cycle latency (ren[r] captures bank r at raddr[r]; outputs hold otherwise).
module act_buffer
  import sprite_pkg::*;
#(
  parameter int unsigned BANKS = IMU_ROW,
  parameter int unsigned DEPTH = 40448
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                wr_en,
  input  logic [$clog2(BANKS)-1:0]            wr_bank,
  input  logic [$clog2(DEPTH)-1:0]            wr_addr,
  input  ia_entry_t                           wr_data,
  input  logic [BANKS-1:0]                    ren,
  input  logic [BANKS-1:0][$clog2(DEPTH)-1:0] raddr,
  output ia_entry_t [BANKS-1:0]               rdata
);

  ia_entry_t mem [BANKS][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else begin
      for (int r = 0; r < BANKS; r++)
        if (ren[r]) rdata[r] <= mem[r][raddr[r]];
    end
  end

endmodule
