// pe: one SPRITE processing element.
//
// Front end: the IMU compares ROWS input activations (one per output
// pixel) with a row of COLS compressed weights. For every IMU row a P-way
// priority encoder picks up to P of the row's still-unserved matches and
// pushes them (operands plus output channel) into the row's index FIFO, as
// many as the FIFO has room for. A served match is remembered in a
// per-row 'consumed' mask. When no row has an unserved match left, the
// weight row is replaced by the next one (prefetched from the weight
// buffer one cycle earlier), so a row normally lives one cycle; in the rare
// case of more than P matches in a row, or a full FIFO, the same weight row
// stays for another cycle and only the leftover matches are compared.
// Back end: every FIFO feeds its own MAC one pair per cycle, which
// accumulates into the row's psum buffer (one entry per output channel).
//
// Stream control: a command starts one IA step. It loads the IA set and
// selects where the weight stream starts: row 0 (new tile), the first row
// after the current chunk's last row (next chunk), or the current chunk's
// first row again (same chunk, next non-zero IAs). The PE streams rows
// until it has finished a row flagged 'last', then raises done and waits.
// The command costs two cycles before the first comparison (buffer read,
// IMU load).
//
// Interface:
//   cmd_valid/cmd/cmd_ia  IA step command (accepted when done or idle state)
//   done                  ready for a command (step finished, or idle)
//   quiet                 done and nothing left in the FIFOs or MACs
//   wb_*                  read port of the PE's weight buffer
//   acc_bank              psum bank being accumulated
//   drain_*               read-and-clear of psum channel drain_addr of all rows
//                         in the other bank (one psum per IMU row)
//   ev_hold               a weight row was kept for another cycle
//   ev_fifo_full          some row could not push all its picks (FIFO full)
//   mac_ops               MACs that took a pair this cycle
// The organisation (IMU, 3-way encoders, FIFOs, MACs, psum buffers) follows
// the paper; the command protocol and the consumed-mask bookkeeping are
// this design's own.
module pe
  import sprite_pkg::*;
#(
  parameter int unsigned ROWS    = IMU_ROW,
  parameter int unsigned COLS    = IMU_COL,
  parameter int unsigned W_ROWS  = 256,
  parameter int unsigned P       = PWAY
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cmd_valid,
  input  pe_cmd_e                    cmd,
  input  ia_entry_t [ROWS-1:0]       cmd_ia,
  output logic                       done,
  output logic                       quiet,
  output logic                       wb_ren,
  output logic [$clog2(W_ROWS)-1:0]  wb_raddr,
  input  w_entry_t [COLS-1:0]        wb_rdata,
  input  logic                       wb_rlast,
  input  logic                       acc_bank,
  input  logic                       drain_en,
  input  logic [OC_W-1:0]            drain_addr,
  output logic [ROWS-1:0][PSUM_W-1:0] drain_data,
  output logic                       ev_hold,
  output logic                       ev_fifo_full,
  output logic [$clog2(ROWS+1)-1:0]  mac_ops
);

  localparam int unsigned RAW = $clog2(W_ROWS);
  localparam int unsigned CIW = $clog2(COLS);
  localparam int unsigned PCW = $clog2(P + 1);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_RUN, S_DONE} state_e;
  state_e state;

  logic [RAW-1:0] ptr, cur_row, chunk_base, next_base, base_sel;

  // ---------------- IMU ----------------
  logic                       ia_load, w_load;
  ia_entry_t [ROWS-1:0]       ia_q;
  w_entry_t  [COLS-1:0]       w_q;
  logic                       w_last_q;
  logic [ROWS-1:0][COLS-1:0]  match, consumed, pending, pushed;

  imu #(.ROWS(ROWS), .COLS(COLS)) u_imu (
    .clk, .rst_n,
    .ia_load, .ia_in(cmd_ia),
    .w_load, .w_in(wb_rdata), .w_last_in(wb_rlast),
    .ia_q, .w_q, .w_last_q, .match
  );

  // ------------- encoders and FIFOs -------------
  logic [ROWS-1:0][P-1:0]           sel_valid;
  logic [ROWS-1:0][P-1:0][CIW-1:0]  sel_idx;
  logic [ROWS-1:0][COLS-1:0]        sel_mask;
  logic [ROWS-1:0][PCW-1:0]         sel_cnt, push_n;
  pair_t [ROWS-1:0][P-1:0]          push_data;
  logic [ROWS-1:0][FCW-1:0]         fifo_free;
  logic [ROWS-1:0]                  fifo_empty, mac_busy, row_left;
  pair_t [ROWS-1:0]                 fifo_head;

  assign pending = (state == S_RUN) ? (match & ~consumed) : '0;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic                     acc_en;
    logic [OC_W-1:0]          acc_addr;
    logic signed [PSUM_W-1:0] acc_rd, acc_wr;

    mw_prio_enc #(.N(COLS), .P(P)) u_enc (
      .req(pending[r]), .sel_valid(sel_valid[r]), .sel_idx(sel_idx[r]),
      .sel_mask(sel_mask[r]), .count(sel_cnt[r])
    );

    // push as many picks as the FIFO can take, lowest index first
    always_comb begin
      push_n[r] = (FCW'(sel_cnt[r]) <= fifo_free[r]) ? sel_cnt[r] : PCW'(fifo_free[r]);
      pushed[r] = '0;
      for (int k = 0; k < P; k++) begin
        push_data[r][k].oc = w_q[sel_idx[r][k]].oc;
        push_data[r][k].ia = ia_q[r].val;
        push_data[r][k].w  = w_q[sel_idx[r][k]].val;
        if (sel_valid[r][k] && k < int'(push_n[r])) pushed[r][sel_idx[r][k]] = 1'b1;
      end
      if (push_n[r] == sel_cnt[r]) pushed[r] = sel_mask[r];
      row_left[r] = |(pending[r] & ~pushed[r]);
    end

    index_fifo #(.DEPTH(FIFO_DEPTH), .P(P)) u_fifo (
      .clk, .rst_n, .wr_n(push_n[r]), .wr_data(push_data[r]),
      .rd_en(!fifo_empty[r]), .rd_data(fifo_head[r]),
      .empty(fifo_empty[r]), .free(fifo_free[r])
    );

    mac_unit u_mac (
      .clk, .rst_n, .in_valid(!fifo_empty[r]), .in_pair(fifo_head[r]),
      .acc_en, .acc_addr, .acc_rd_data(acc_rd), .acc_wr_data(acc_wr),
      .busy(mac_busy[r])
    );

    psum_buffer #(.DEPTH(PSUM_BANK_DEPTH)) u_psum (
      .clk, .rst_n, .acc_bank, .acc_en, .acc_addr, .acc_wr_data(acc_wr),
      .acc_rd_data(acc_rd),
      .drain_en, .drain_addr, .drain_data(drain_data[r])
    );
  end

  // ---------------- stream control ----------------
  logic all_clear, accept;
  assign all_clear = ~|row_left;
  assign accept    = cmd_valid && (state == S_IDLE || state == S_DONE);

  always_comb begin
    unique case (cmd)
      CMD_NEW_TILE:   base_sel = '0;
      CMD_NEXT_CHUNK: base_sel = next_base;
      default:        base_sel = chunk_base;
    endcase
  end

  always_comb begin
    ia_load  = accept;
    w_load   = 1'b0;
    wb_ren   = 1'b0;
    wb_raddr = ptr;
    if (accept) begin
      wb_ren   = 1'b1;
      wb_raddr = base_sel;
    end else if (state == S_FILL) begin
      w_load = 1'b1;
      wb_ren = 1'b1;
    end else if (state == S_RUN && all_clear && !w_last_q) begin
      w_load = 1'b1;
      wb_ren = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ptr        <= '0;
      cur_row    <= '0;
      chunk_base <= '0;
      next_base  <= '0;
      consumed   <= '0;
    end else begin
      if (accept) begin
        chunk_base <= base_sel;
        cur_row    <= base_sel;
        ptr        <= base_sel + 1'b1;
        state      <= S_FILL;
      end else begin
        unique case (state)
          S_FILL: begin
            ptr      <= ptr + 1'b1;
            consumed <= '0;
            state    <= S_RUN;
          end
          S_RUN: begin
            if (all_clear) begin
              consumed <= '0;
              if (w_last_q) begin
                next_base <= cur_row + 1'b1;
                state     <= S_DONE;
              end else begin
                ptr     <= ptr + 1'b1;
                cur_row <= cur_row + 1'b1;
              end
            end else begin
              consumed <= consumed | pushed;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign done         = (state == S_DONE || state == S_IDLE);
  assign quiet        = (state == S_DONE || state == S_IDLE) && (&fifo_empty) && !(|mac_busy);
  assign ev_hold      = (state == S_RUN) && !all_clear;

  always_comb begin
    ev_fifo_full = 1'b0;
    mac_ops      = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (FCW'(sel_cnt[r]) > fifo_free[r]) ev_fifo_full = 1'b1;
      mac_ops = mac_ops + {{($clog2(ROWS+1)-1){1'b0}}, !fifo_empty[r]};
    end
  end

endmodule
