// compression_unit: activation and compression of complete psums.
//
// Takes one input-channel chunk of the next layer at a time: the complete
// psums of one output pixel for CH consecutive output channels (one per PE,
// since output channel oc = k * NUM_PE + pe). It applies ReLU, rescales the
// 24-bit Q16.8 psum to a 16-bit Q8.8 activation (arithmetic shift right by
// out_shift, then saturation to 32767) and compresses the chunk into the
// sparse format the activation buffer uses: the non-zero values packed to
// the front, each with its channel index inside the chunk, and their count.
// The paper names the activation and compression logic but does not
// describe it; ReLU, the rescaling and the packed output are this design's
// choices.
//
// Interface: a one-entry pipeline register with valid/ready on both sides
// (in_ready = !out_valid || out_ready). Latency one cycle. in_pixel and
// in_chunk travel with the data. Entries at positions out_count and above
// are zero; an empty chunk has out_count = 0.
module compression_unit
  import sprite_pkg::*;
#(
  parameter int unsigned CH    = NUM_PE,
  parameter int unsigned PIX_W = 16,
  parameter int unsigned CHK_W = OC_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [CH-1:0][PSUM_W-1:0]        in_psum,
  input  logic [3:0]                      out_shift,
  input  logic [PIX_W-1:0]                in_pixel,
  input  logic [CHK_W-1:0]                in_chunk,
  output logic                            out_valid,
  input  logic                            out_ready,
  output logic [PIX_W-1:0]                out_pixel,
  output logic [CHK_W-1:0]                out_chunk,
  output logic [$clog2(CH+1)-1:0]         out_count,
  output logic signed [CH-1:0][DATA_W-1:0] out_val,
  output logic [CH-1:0][$clog2(CH)-1:0]   out_idx
);

  localparam logic signed [PSUM_W-1:0] VMAX = PSUM_W'((1 << (DATA_W-1)) - 1);
  localparam int unsigned CNT_W = $clog2(CH + 1);

  logic signed [CH-1:0][DATA_W-1:0]   act;
  logic signed [CH-1:0][DATA_W-1:0]   pk_val;
  logic [CH-1:0][$clog2(CH)-1:0]      pk_idx;
  logic [CNT_W-1:0]                   pk_cnt;
  logic signed [PSUM_W-1:0]           scaled;

  // ReLU and rescaling
  always_comb begin
    for (int c = 0; c < CH; c++) begin
      scaled = $signed(in_psum[c]) >>> out_shift;
      if ($signed(in_psum[c]) <= 0) act[c] = '0;
      else if (scaled > VMAX) act[c] = VMAX[DATA_W-1:0];
      else                    act[c] = scaled[DATA_W-1:0];
    end
  end

  // compaction: the n-th non-zero goes to position n
  always_comb begin
    pk_val = '0;
    pk_idx = '0;
    pk_cnt = '0;
    for (int c = 0; c < CH; c++) begin
      if (act[c] != '0) begin
        pk_val[pk_cnt] = act[c];
        pk_idx[pk_cnt] = c[$clog2(CH)-1:0];
        pk_cnt         = pk_cnt + 1'b1;
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pixel <= '0;
      out_chunk <= '0;
      out_count <= '0;
      out_val   <= '0;
      out_idx   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pixel <= in_pixel;
        out_chunk <= in_chunk;
        out_count <= pk_cnt;
        out_val   <= pk_val;
        out_idx   <= pk_idx;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_count))
    else $error("compression_unit: output changed while stalled");

endmodule
