// index_fifo: index FIFO between the priority encoders and one MAC.
//
// Several pairs can match in one IMU row in one cycle, but the row owns a
// single MAC and psum buffer. The FIFO absorbs up to P pairs per cycle and
// releases one per cycle, so a short burst of matches does not stall the
// front end. Depth 6 follows the paper; the pairs carry their operand values
// and output channel (this design's choice, since the weight buffer is
// overwritten in the next cycle).
//
// Interface: wr_n (0..P) entries of wr_data are pushed, lowest first; the
// writer must keep wr_n <= free (asserted). rd_en pops rd_data, which is the
// head entry shown combinationally while !empty. free counts slots before
// this cycle's pop.
module index_fifo
  import sprite_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned P     = PWAY
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(P+1)-1:0]     wr_n,
  input  pair_t [P-1:0]              wr_data,
  input  logic                       rd_en,
  output pair_t                      rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] free
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  pair_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] cnt;
  logic          pop;

  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return s[AW-1:0];
  endfunction

  assign empty   = (cnt == '0);
  assign free    = CW'(DEPTH) - cnt;
  assign rd_data = mem[rd_ptr];
  assign pop     = rd_en && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      wr_ptr <= wrap_add(wr_ptr, int'(wr_n));
      if (pop) rd_ptr <= wrap_add(rd_ptr, 1);
      cnt <= cnt + CW'(wr_n) - CW'(pop);
    end
  end

  // storage needs no reset: an entry is read only after it was written
  always_ff @(posedge clk) begin
    for (int k = 0; k < P; k++)
      if (k < int'(wr_n)) mem[wrap_add(wr_ptr, k)] <= wr_data[k];
  end

  // The writer checks free space before it pushes.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) CW'(wr_n) <= free)
    else $error("index_fifo: push of %0d with only %0d free", wr_n, free);

endmodule
