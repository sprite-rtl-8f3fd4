// mac_unit: multiply-accumulate unit serving one IMU row.
//
// Two pipeline stages. Stage 1 multiplies the 16-bit input activation by the
// 16-bit weight of a matched pair popped from the row's index FIFO and
// registers the 32-bit product with the pair's output channel. Stage 2
// reads that channel's 24-bit psum from the psum buffer (combinational
// read), adds the product scaled to psum precision, saturates and writes
// it back in the same cycle, so back-to-back pairs of the same channel need
// no forwarding.
//
// Fixed point (this design's choice; the paper gives only 16b IA/W and 24b
// psums): IA and W are Q8.8, the product is shifted right by PROD_SHIFT = 8
// into a Q16.8 psum, and the sum saturates to 24 bits.
//
// Interface: in_valid/in_pair accept one pair per cycle (always ready).
// acc_* is the read-modify-write port into the psum buffer. busy is high
// while stage 2 holds a pair.
module mac_unit
  import sprite_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  pair_t                    in_pair,
  output logic                     acc_en,
  output logic [OC_W-1:0]          acc_addr,
  input  logic signed [PSUM_W-1:0] acc_rd_data,
  output logic signed [PSUM_W-1:0] acc_wr_data,
  output logic                     busy
);

  localparam logic signed [PSUM_W:0] PMAX = (PSUM_W+1)'((1 << (PSUM_W-1)) - 1);
  localparam logic signed [PSUM_W:0] PMIN = -(PSUM_W+1)'(1 << (PSUM_W-1));

  logic                         s2_valid;
  logic [OC_W-1:0]              s2_oc;
  logic signed [2*DATA_W-1:0]   s2_prod;
  logic signed [PSUM_W:0]       sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_oc    <= '0;
      s2_prod  <= '0;
    end else begin
      s2_valid <= in_valid;
      s2_oc    <= in_pair.oc;
      s2_prod  <= in_pair.ia * in_pair.w;
    end
  end

  always_comb begin
    sum = (PSUM_W+1)'(acc_rd_data) + (PSUM_W+1)'(s2_prod >>> PROD_SHIFT);
    if (sum > PMAX)      acc_wr_data = PMAX[PSUM_W-1:0];
    else if (sum < PMIN) acc_wr_data = PMIN[PSUM_W-1:0];
    else                 acc_wr_data = sum[PSUM_W-1:0];
  end

  assign acc_en   = s2_valid;
  assign acc_addr = s2_oc;
  assign busy     = s2_valid;

endmodule
