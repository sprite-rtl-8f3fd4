// psum_buffer: double-buffered partial-sum storage of one IMU row.
//
// Each IMU row (one output pixel) owns one psum buffer; its entries are the
// output channels mapped to this PE. Two banks of DEPTH 24-bit psums give
// 2 x 64 x 3 B = 0.375 KB per MAC, the capacity the paper lists (0.38 KB /
// MAC). While the MAC accumulates into bank acc_bank, the other bank holds
// the complete psums of the previous tile and is drained: a drain read
// returns the entry combinationally and clears it to zero at the clock
// edge, leaving the bank ready for the next tile. Reset clears both banks.
//
// Interface:
//   acc_bank              bank being accumulated
//   acc_en/addr/wr_data   write port (the MAC's read-modify-write)
//   acc_rd_data           combinational read of acc_bank[acc_addr]
//   drain_en/addr/data    read-and-clear of bank !acc_bank
module psum_buffer
  import sprite_pkg::*;
#(
  parameter int unsigned DEPTH = PSUM_BANK_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      acc_bank,
  input  logic                      acc_en,
  input  logic [$clog2(DEPTH)-1:0]  acc_addr,
  input  logic signed [PSUM_W-1:0]  acc_wr_data,
  output logic signed [PSUM_W-1:0]  acc_rd_data,
  input  logic                      drain_en,
  input  logic [$clog2(DEPTH)-1:0]  drain_addr,
  output logic signed [PSUM_W-1:0]  drain_data
);

  logic signed [PSUM_W-1:0] mem [2][DEPTH];

  assign acc_rd_data = mem[acc_bank][acc_addr];
  assign drain_data  = mem[!acc_bank][drain_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < DEPTH; i++) mem[b][i] <= '0;
    end else begin
      if (acc_en)   mem[acc_bank][acc_addr]    <= acc_wr_data;
      if (drain_en) mem[!acc_bank][drain_addr] <= '0;
    end
  end

endmodule
