// global_controller: sequencing of a SPRITE layer pass.
//
// Loop nest (outer to inner):
//   tile  : a group of ROWS output pixels, one per IMU row (all PEs share it)
//   chunk : an input-channel chunk of IC_CHUNK channels
//   step  : the next non-zero input activation of every pixel in the chunk
// For each step the controller reads one entry from each activation-buffer
// bank whose pixel still has non-zeros left in the chunk, broadcasts the set
// to all PEs with a command, and waits until every PE has streamed the
// chunk's weights past it (a barrier; PEs with fewer weights wait). When
// every pixel's list of the chunk has ended it moves to the next chunk;
// after the last chunk the tile's psums are complete. It then waits until
// the PEs' FIFOs and MACs are empty and the previous tile has been drained,
// swaps the psum banks and starts draining the finished bank while the next
// tile is computed. Draining reads, per cycle, psum k of every IMU row from
// every PE (output channels k*NUM_PE .. k*NUM_PE+NUM_PE-1 of all ROWS pixels
// of the tile) into the compression lanes, k = 0 .. cfg_num_oc-1, so a tile
// drains in cfg_num_oc cycles when the output is not stalled. cu_pixel is
// the tile's first pixel; lane r carries pixel cu_pixel + r.
//
// The next step's activations are read from the banks while the PEs are
// still busy with the current step, so a step is issued in the same cycle
// in which the last PE reports done; with the PE's own row fetch an IA step
// costs the chunk's weight rows plus two cycles.
//
// This follows the paper's dataflow (weights stream past fixed input
// activations; the activation buffer advances once the weight stream is
// complete); the barrier, the prefetch, the bank swap rule and the drain
// order are this design's own.
//
// Interface: cfg_* are held stable from start until done. start is a pulse;
// busy is high until the last tile has been drained; done pulses then.
// ev_drain_wait is high in cycles where a finished tile waits for the
// drain of the previous one, ev_step pulses once per IA step.
module global_controller
  import sprite_pkg::*;
#(
  parameter int unsigned NUM_PES  = NUM_PE,
  parameter int unsigned ROWS     = IMU_ROW,
  parameter int unsigned IA_DEPTH = 40448,
  parameter int unsigned PIX_W    = 16
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  input  logic [PIX_W-1:0]                       cfg_num_tiles,
  input  logic [7:0]                             cfg_num_chunks,
  input  logic [OC_W:0]                          cfg_num_oc,
  output logic                                   busy,
  output logic                                   done,
  // activation buffer read ports
  output logic [ROWS-1:0]                        ia_ren,
  output logic [ROWS-1:0][$clog2(IA_DEPTH)-1:0]  ia_raddr,
  input  ia_entry_t [ROWS-1:0]                   ia_rdata,
  // PE array
  output logic                                   pe_cmd_valid,
  output pe_cmd_e                                pe_cmd,
  output ia_entry_t [ROWS-1:0]                   pe_cmd_ia,
  input  logic [NUM_PES-1:0]                     pe_done,
  input  logic [NUM_PES-1:0]                     pe_quiet,
  output logic                                   acc_bank,
  output logic                                   drain_en,
  output logic [OC_W-1:0]                        drain_addr,
  // compression unit
  output logic                                   cu_valid,
  input  logic                                   cu_ready,
  output logic [PIX_W-1:0]                       cu_pixel,
  output logic [OC_W-1:0]                        cu_chunk,
  // events
  output logic                                   ev_drain_wait,
  output logic                                   ev_step
);

  localparam int unsigned AW = $clog2(IA_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_TILE_END, S_FLUSH} state_e;
  // prefetch of the next IA set: none yet / read issued or data held /
  // no further step in this tile
  typedef enum logic [1:0] {PF_IDLE, PF_READY, PF_NONE} pf_e;
  state_e state;
  pf_e    pf;

  logic [PIX_W-1:0]        tile;
  logic [7:0]              chunk;
  logic                    tile_first;
  logic [ROWS-1:0]         row_end, rd_mask, pf_mask;
  logic [ROWS-1:0][AW-1:0] ptr;
  pe_cmd_e                 step_cmd, pf_cmd;
  logic                    pf_go, pf_new_chunk, issue;

  // drain engine
  logic                  dr_active;
  logic [PIX_W-1:0]      dr_tile;
  logic [OC_W-1:0]       dr_oc;
  logic                  dr_fire, dr_start;

  assign busy = (state != S_IDLE);

  // Which activation lists the next step reads, decided as soon as the
  // previous step has been issued.
  always_comb begin
    pf_go        = 1'b1;
    pf_new_chunk = 1'b0;
    pf_cmd       = CMD_SAME_CHUNK;
    pf_mask      = ~row_end;
    if (tile_first) begin
      pf_cmd  = CMD_NEW_TILE;
      pf_mask = '1;
    end else if (&row_end) begin
      if (chunk == cfg_num_chunks - 1'b1) begin
        pf_go = 1'b0;
      end else begin
        pf_cmd       = CMD_NEXT_CHUNK;
        pf_mask      = '1;
        pf_new_chunk = 1'b1;
      end
    end
  end

  always_comb begin
    ia_ren   = '0;
    ia_raddr = ptr;
    if (state == S_RUN && pf == PF_IDLE && pf_go) ia_ren = pf_mask;
  end

  // a step is issued when every PE has finished the previous one
  assign issue        = (state == S_RUN) && (pf == PF_READY) && (&pe_done);
  assign pe_cmd_valid = issue;
  assign pe_cmd       = step_cmd;
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      pe_cmd_ia[r]       = ia_rdata[r];
      pe_cmd_ia[r].valid = rd_mask[r] && ia_rdata[r].valid;
    end
  end
  assign ev_step = issue;

  assign dr_start      = (state == S_TILE_END) && (&pe_quiet) && !dr_active;
  assign ev_drain_wait = (state == S_TILE_END) && (&pe_quiet) && dr_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pf         <= PF_IDLE;
      tile       <= '0;
      chunk      <= '0;
      tile_first <= 1'b0;
      row_end    <= '0;
      rd_mask    <= '0;
      ptr        <= '0;
      step_cmd   <= CMD_NEW_TILE;
      acc_bank   <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tile       <= '0;
          chunk      <= '0;
          tile_first <= 1'b1;
          row_end    <= '0;
          ptr        <= '0;
          pf         <= PF_IDLE;
          state      <= S_RUN;
        end
        S_RUN: begin
          if (pf == PF_IDLE) begin
            if (pf_go) begin
              // read the next entry of every list still open
              for (int r = 0; r < ROWS; r++)
                if (pf_mask[r]) ptr[r] <= ptr[r] + 1'b1;
              rd_mask    <= pf_mask;
              step_cmd   <= pf_cmd;
              tile_first <= 1'b0;
              if (pf_new_chunk) begin
                chunk   <= chunk + 1'b1;
                row_end <= '0;
              end
              pf <= PF_READY;
            end else begin
              pf <= PF_NONE;
            end
          end else if (issue) begin
            for (int r = 0; r < ROWS; r++)
              if (rd_mask[r] && ia_rdata[r].last) row_end[r] <= 1'b1;
            pf <= PF_IDLE;
          end else if (pf == PF_NONE && (&pe_done)) begin
            state <= S_TILE_END;
          end
        end
        S_TILE_END: if (dr_start) begin
          acc_bank <= !acc_bank;
          if (tile == cfg_num_tiles - 1'b1) begin
            state <= S_FLUSH;
          end else begin
            tile       <= tile + 1'b1;
            chunk      <= '0;
            row_end    <= '0;
            tile_first <= 1'b1;
            pf         <= PF_IDLE;
            state      <= S_RUN;
          end
        end
        S_FLUSH: if (!dr_active) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- drain of the finished psum bank ----------------
  assign dr_fire    = dr_active && cu_ready;
  assign cu_valid   = dr_active;
  assign drain_en   = dr_fire;
  assign drain_addr = dr_oc;
  assign cu_chunk   = dr_oc;
  assign cu_pixel   = PIX_W'(dr_tile * ROWS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dr_active <= 1'b0;
      dr_tile   <= '0;
      dr_oc     <= '0;
    end else if (dr_start) begin
      dr_active <= 1'b1;
      dr_tile   <= tile;
      dr_oc     <= '0;
    end else if (dr_fire) begin
      if ({1'b0, dr_oc} == cfg_num_oc - 1'b1) begin
        dr_oc     <= '0;
        dr_active <= 1'b0;
      end else begin
        dr_oc <= dr_oc + 1'b1;
      end
    end
  end

  a_cmd_when_done: assert property (@(posedge clk) disable iff (!rst_n) pe_cmd_valid |-> &pe_done)
    else $error("global_controller: command issued to a busy PE");

endmodule
