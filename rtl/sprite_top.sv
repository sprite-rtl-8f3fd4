// sprite_top: the SPRITE sparse CNN core.
//
// A shared activation buffer broadcasts one non-zero input activation per
// IMU row (output pixel) to an array of NUM_PE processing elements. Every
// PE has its own weight buffer and its own output channels (PE p computes
// output channels p, p + NUM_PE, p + 2*NUM_PE, ...), matches the
// broadcast activations against its weights by input-channel index,
// multiplies the matched pairs and accumulates them in double-buffered
// psum buffers. The global controller steps through tiles, input-channel
// chunks and activation steps; complete psums of a tile are drained,
// 7 pixels x NUM_PE channels per cycle (one psum buffer per IMU row),
// through 7 lanes of activation and compression logic, which emit them in
// the same sparse format that the next layer reads.
//
// Interface:
//   ia_wr_*      loader port of the activation buffer (bank = IMU row)
//   w_wr_*       loader port of the weight buffers (w_wr_pe selects one)
//   cfg_*/start  layer pass: tiles of IMU_ROW pixels, input-channel chunks,
//                output channels per PE (<= 64), output scaling shift
//   busy/done    pass in progress / finished (pulse)
//   out_*        compressed output chunks, valid/ready; one beat carries
//                output chunk out_chunk of pixels out_pixel .. out_pixel+6
//                (lane r = pixel out_pixel + r)
//   stat_*       performance counters, cleared by start
// Sizes follow the paper's main configuration (32 PEs of 7 MACs,
// imu_row 7, imu_col = ic_chunk 32, 3-way encoders, FIFO depth 6, 16/24-bit
// data, 1691 KB of global buffers); the loader interfaces, the output-channel
// mapping and the counters are this design's own.
module sprite_top
  import sprite_pkg::*;
#(
  parameter int unsigned N_PE     = NUM_PE,
  parameter int unsigned W_ROWS   = 256,
  parameter int unsigned IA_DEPTH = 40448,
  parameter int unsigned PIX_W    = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // activation buffer loader
  input  logic                              ia_wr_en,
  input  logic [$clog2(IMU_ROW)-1:0]        ia_wr_bank,
  input  logic [$clog2(IA_DEPTH)-1:0]       ia_wr_addr,
  input  ia_entry_t                         ia_wr_data,
  // weight buffer loader
  input  logic                              w_wr_en,
  input  logic [$clog2(N_PE)-1:0]           w_wr_pe,
  input  logic [$clog2(W_ROWS)-1:0]         w_wr_row,
  input  logic [$clog2(IMU_COL)-1:0]        w_wr_slot,
  input  w_entry_t                          w_wr_entry,
  input  logic                              w_wr_last,
  // layer pass
  input  logic                              start,
  input  logic [PIX_W-1:0]                  cfg_num_tiles,
  input  logic [7:0]                        cfg_num_chunks,
  input  logic [OC_W:0]                     cfg_num_oc,
  input  logic [3:0]                        cfg_out_shift,
  output logic                              busy,
  output logic                              done,
  // compressed output
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic [PIX_W-1:0]                  out_pixel,
  output logic [OC_W-1:0]                   out_chunk,
  output logic [IMU_ROW-1:0][$clog2(N_PE+1)-1:0]         out_count,
  output logic [IMU_ROW-1:0][N_PE-1:0][DATA_W-1:0]       out_val,
  output logic [IMU_ROW-1:0][N_PE-1:0][$clog2(N_PE)-1:0] out_idx,
  // counters
  output logic [31:0]                       stat_cycles,
  output logic [31:0]                       stat_mac_ops,
  output logic [31:0]                       stat_ia_steps,
  output logic [31:0]                       stat_hold,
  output logic [31:0]                       stat_fifo_full,
  output logic [31:0]                       stat_drain_wait
);

  localparam int unsigned RAW = $clog2(W_ROWS);
  localparam int unsigned MOW = $clog2(IMU_ROW + 1);

  // activation buffer
  logic [IMU_ROW-1:0]                         ia_ren;
  logic [IMU_ROW-1:0][$clog2(IA_DEPTH)-1:0]   ia_raddr;
  ia_entry_t [IMU_ROW-1:0]                    ia_rdata;

  act_buffer #(.BANKS(IMU_ROW), .DEPTH(IA_DEPTH)) u_act_buf (
    .clk, .rst_n, .wr_en(ia_wr_en), .wr_bank(ia_wr_bank), .wr_addr(ia_wr_addr),
    .wr_data(ia_wr_data), .ren(ia_ren), .raddr(ia_raddr), .rdata(ia_rdata)
  );

  // controller
  logic                       pe_cmd_valid, acc_bank, drain_en, cu_valid, cu_ready;
  pe_cmd_e                    pe_cmd;
  ia_entry_t [IMU_ROW-1:0]    pe_cmd_ia;
  logic [N_PE-1:0]            pe_done, pe_quiet, pe_hold, pe_ffull;
  logic [OC_W-1:0]            drain_addr, cu_chunk;
  logic [PIX_W-1:0]           cu_pixel;
  logic                       ev_drain_wait, ev_step;
  logic [N_PE-1:0][IMU_ROW-1:0][PSUM_W-1:0] drain_psum;
  logic [N_PE-1:0][MOW-1:0]   pe_mac_ops;

  global_controller #(.NUM_PES(N_PE), .ROWS(IMU_ROW), .IA_DEPTH(IA_DEPTH), .PIX_W(PIX_W)) u_ctrl (
    .clk, .rst_n, .start, .cfg_num_tiles, .cfg_num_chunks, .cfg_num_oc,
    .busy, .done, .ia_ren, .ia_raddr, .ia_rdata,
    .pe_cmd_valid, .pe_cmd, .pe_cmd_ia, .pe_done, .pe_quiet,
    .acc_bank, .drain_en, .drain_addr,
    .cu_valid, .cu_ready, .cu_pixel, .cu_chunk,
    .ev_drain_wait, .ev_step
  );

  // PE array, each with its own weight buffer
  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    logic                  wb_ren, wb_rlast;
    logic [RAW-1:0]        wb_raddr;
    w_entry_t [IMU_COL-1:0] wb_rdata;

    weight_buffer #(.ROWS(W_ROWS), .ROW_SLOTS(IMU_COL)) u_wbuf (
      .clk, .rst_n,
      .wr_en(w_wr_en && (w_wr_pe == p[$clog2(N_PE)-1:0])),
      .wr_row(w_wr_row), .wr_slot(w_wr_slot), .wr_entry(w_wr_entry), .wr_last(w_wr_last),
      .ren(wb_ren), .raddr(wb_raddr), .rdata(wb_rdata), .rlast(wb_rlast)
    );

    pe #(.ROWS(IMU_ROW), .COLS(IMU_COL), .W_ROWS(W_ROWS), .P(PWAY)) u_pe (
      .clk, .rst_n,
      .cmd_valid(pe_cmd_valid), .cmd(pe_cmd), .cmd_ia(pe_cmd_ia),
      .done(pe_done[p]), .quiet(pe_quiet[p]),
      .wb_ren, .wb_raddr, .wb_rdata, .wb_rlast,
      .acc_bank, .drain_en, .drain_addr, .drain_data(drain_psum[p]),
      .ev_hold(pe_hold[p]), .ev_fifo_full(pe_ffull[p]), .mac_ops(pe_mac_ops[p])
    );
  end

  // activation and compression: one lane per IMU row, all lanes in step
  logic [IMU_ROW-1:0] lane_in_ready, lane_out_valid;
  logic [IMU_ROW-1:0][PIX_W-1:0] lane_pixel;
  logic [IMU_ROW-1:0][OC_W-1:0]  lane_chunk;

  for (genvar r = 0; r < IMU_ROW; r++) begin : g_lane
    logic [N_PE-1:0][PSUM_W-1:0] lane_psum;
    always_comb for (int p = 0; p < N_PE; p++) lane_psum[p] = drain_psum[p][r];

    compression_unit #(.CH(N_PE), .PIX_W(PIX_W), .CHK_W(OC_W)) u_comp (
      .clk, .rst_n, .in_valid(cu_valid), .in_ready(lane_in_ready[r]), .in_psum(lane_psum),
      .out_shift(cfg_out_shift), .in_pixel(cu_pixel + PIX_W'(r)), .in_chunk(cu_chunk),
      .out_valid(lane_out_valid[r]), .out_ready, .out_pixel(lane_pixel[r]), .out_chunk(lane_chunk[r]),
      .out_count(out_count[r]), .out_val(out_val[r]), .out_idx(out_idx[r])
    );
  end

  // the lanes share valid, ready and tags; lane 0 speaks for all
  assign cu_ready  = lane_in_ready[0];
  assign out_valid = lane_out_valid[0];
  assign out_pixel = lane_pixel[0];
  assign out_chunk = lane_chunk[0];

  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
      lane_in_ready == {IMU_ROW{lane_in_ready[0]}} && lane_out_valid == {IMU_ROW{lane_out_valid[0]}})
    else $error("sprite_top: compression lanes out of step");
  for (genvar r = 1; r < IMU_ROW; r++) begin : g_lane_chk
    a_lane_tags: assert property (@(posedge clk) disable iff (!rst_n)
        lane_out_valid[0] |-> lane_pixel[r] == lane_pixel[0] + PIX_W'(r) && lane_chunk[r] == lane_chunk[0])
      else $error("sprite_top: lane %0d tags differ", r);
  end

  // performance counters
  logic [31:0] ops_now;
  always_comb begin
    ops_now = '0;
    for (int p = 0; p < N_PE; p++) ops_now = ops_now + 32'(pe_mac_ops[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_cycles     <= '0;
      stat_mac_ops    <= '0;
      stat_ia_steps   <= '0;
      stat_hold       <= '0;
      stat_fifo_full  <= '0;
      stat_drain_wait <= '0;
    end else if (start && !busy) begin
      stat_cycles     <= '0;
      stat_mac_ops    <= '0;
      stat_ia_steps   <= '0;
      stat_hold       <= '0;
      stat_fifo_full  <= '0;
      stat_drain_wait <= '0;
    end else begin
      if (busy)          stat_cycles     <= stat_cycles + 1'b1;
      stat_mac_ops <= stat_mac_ops + ops_now;
      if (ev_step)       stat_ia_steps   <= stat_ia_steps + 1'b1;
      if (|pe_hold)      stat_hold       <= stat_hold + 1'b1;
      if (|pe_ffull)     stat_fifo_full  <= stat_fifo_full + 1'b1;
      if (ev_drain_wait) stat_drain_wait <= stat_drain_wait + 1'b1;
    end
  end

endmodule
