// imu: index-matching unit of one SPRITE processing element.
//
// The IMU holds two small index buffers and a comparator array between them:
//   * the IA buffer has ROWS entries, one non-zero input activation per
//     spatial domain (output pixel) of the PE;
//   * the weight buffer has COLS slots filled with consecutive non-zero
//     weights of one input-channel chunk; when one output channel's weights
//     in the chunk end, the next output channel's follow in the same row,
//     so one row covers several output channels when weights are sparse.
// Comparator (r,c) raises match[r][c] when both entries are valid and carry
// the same input-channel index. Because each IA is compared against about
// 1/density output channels at once, about one match per row is expected
// per cycle whatever the density (the scheme's "constant probability").
//
// Interface: ia_load / w_load capture new buffer contents at the clock
// edge; match is combinational from the registered buffers (zero latency).
// The buffer organisation and the comparator array follow the paper; the
// record layout of the entries is this design's own.
module imu
  import sprite_pkg::*;
#(
  parameter int unsigned ROWS = IMU_ROW,
  parameter int unsigned COLS = IMU_COL
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            ia_load,
  input  ia_entry_t [ROWS-1:0]            ia_in,
  input  logic                            w_load,
  input  w_entry_t  [COLS-1:0]            w_in,
  input  logic                            w_last_in,   // row is the chunk's last
  output ia_entry_t [ROWS-1:0]            ia_q,
  output w_entry_t  [COLS-1:0]            w_q,
  output logic                            w_last_q,
  output logic [ROWS-1:0][COLS-1:0]       match
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ia_q     <= '0;
      w_q      <= '0;
      w_last_q <= 1'b0;
    end else begin
      if (ia_load) ia_q <= ia_in;
      if (w_load) begin
        w_q      <= w_in;
        w_last_q <= w_last_in;
      end
    end
  end

  // ROWS x COLS comparator array
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        match[r][c] = ia_q[r].valid && w_q[c].valid && (ia_q[r].idx == w_q[c].idx);
  end

endmodule
