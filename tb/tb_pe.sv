// tb_pe: self-checking test of one processing element.
//
// The testbench builds a random sparse layer slice (NOC output channels,
// NCH input-channel chunks of 32, 7 output pixels), loads the compressed
// weights into a weight buffer, and drives the PE the way the global
// controller does: for each chunk, IA steps of one non-zero activation per
// pixel, waiting for done between steps. Chunk 0 is moderately sparse,
// chunk 1 very sparse, chunk 2 puts every channel's only weight at
// index 0 together with activations at index 0, which forces rows with
// far more than 3 matches (weight row held) and full FIFOs.
// Three tiles are run, alternating psum banks; after each the finished
// bank is drained and compared with a reference computed here.
// Rate check: every IA step must take exactly 1 + (weight rows of the
// chunk) + (hold cycles) cycles from command to done, i.e. one weight row
// per cycle except for held rows.
module tb_pe;
  import sprite_pkg::*;
  localparam int R = IMU_ROW, C = IMU_COL, WR = 64;
  localparam int NOC = 40, NCH = 3;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  pe_cmd_e cmd = CMD_NEW_TILE;
  ia_entry_t [R-1:0] cmd_ia = '0;
  logic done, quiet, wb_ren, wb_rlast, acc_bank = 0, drain_en = 0;
  logic [5:0] wb_raddr;
  w_entry_t [C-1:0] wb_rdata;
  logic [OC_W-1:0] drain_addr = 0;
  logic [R-1:0][PSUM_W-1:0] drain_data;
  logic ev_hold, ev_fifo_full;
  logic [2:0] mac_ops;

  logic wr_en = 0, wr_last = 0;
  logic [5:0] wr_row = 0;
  logic [4:0] wr_slot = 0;
  w_entry_t wr_entry = '0;

  int checks = 0, failures = 0;
  int n_hold = 0, n_ffull = 0, n_ops = 0, exp_ops = 0;

  weight_buffer #(.ROWS(WR)) u_wb (
    .clk, .rst_n, .wr_en, .wr_row, .wr_slot, .wr_entry, .wr_last,
    .ren(wb_ren), .raddr(wb_raddr), .rdata(wb_rdata), .rlast(wb_rlast));

  pe #(.W_ROWS(WR)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_hold  += ev_hold;
    n_ffull += ev_fifo_full;
    n_ops   += mac_ops;
  end

  // dense weights of the slice and packed row count per chunk
  int w [NOC][NCH][C];
  int rows_of [NCH];
  // activation lists: value / index per pixel per chunk
  int ia_v [R][NCH][$];
  int ia_i [R][NCH][$];
  longint ref_ps [R][NOC];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_w();
    return $urandom_range(0, 600) - 300;
  endfunction

  task automatic make_weights();
    for (int o = 0; o < NOC; o++)
      for (int q = 0; q < NCH; q++)
        for (int i = 0; i < C; i++) begin
          w[o][q][i] = 0;
          if (q == 0 && $urandom_range(0, 99) < 30) w[o][q][i] = rnd_w();
          if (q == 1 && $urandom_range(0, 99) < 5)  w[o][q][i] = rnd_w();
          if (q == 2 && i == 0)                     w[o][q][i] = rnd_w() | 1;
        end
  endtask

  task automatic write_slot(int row, int slot, w_entry_t e, bit last);
    @(negedge clk);
    wr_en = 1; wr_row = row; wr_slot = slot; wr_entry = e; wr_last = last;
    @(negedge clk);
    wr_en = 0;
  endtask

  // packs each chunk's non-zeros, channel by channel, into rows of C slots
  task automatic load_weights();
    int row = 0;
    for (int q = 0; q < NCH; q++) begin
      w_entry_t list [$];
      int nrows;
      for (int o = 0; o < NOC; o++)
        for (int i = 0; i < C; i++)
          if (w[o][q][i] != 0) begin
            w_entry_t e;
            e.valid = 1; e.oc = o; e.idx = i; e.val = w[o][q][i];
            list.push_back(e);
          end
      nrows = (list.size() + C - 1) / C;
      if (nrows == 0) nrows = 1;
      rows_of[q] = nrows;
      for (int r = 0; r < nrows; r++)
        for (int s = 0; s < C; s++) begin
          w_entry_t e = '0;
          if (r * C + s < list.size()) e = list[r * C + s];
          write_slot(row + r, s, e, (s == 0) && (r == nrows - 1));
        end
      row += nrows;
    end
  endtask

  task automatic make_ia(int tile);
    for (int r = 0; r < R; r++)
      for (int q = 0; q < NCH; q++) begin
        ia_v[r][q].delete();
        ia_i[r][q].delete();
        for (int i = 0; i < C; i++) begin
          bit nz;
          if (q == 2) nz = (i == 0) || ($urandom_range(0, 99) < 20);
          else        nz = ($urandom_range(0, 99) < 25 + 20 * tile);
          if (nz) begin
            ia_v[r][q].push_back($urandom_range(1, 500));
            ia_i[r][q].push_back(i);
          end
        end
      end
    for (int r = 0; r < R; r++)
      for (int o = 0; o < NOC; o++) begin
        ref_ps[r][o] = 0;
        for (int q = 0; q < NCH; q++)
          foreach (ia_v[r][q][k]) begin
            ref_ps[r][o] += (longint'(ia_v[r][q][k]) * w[o][q][ia_i[r][q][k]]) >>> 8;
            if (w[o][q][ia_i[r][q][k]] != 0) exp_ops++;
          end
      end
  endtask

  task automatic run_tile();
    for (int q = 0; q < NCH; q++) begin
      int maxlen = 1;
      for (int r = 0; r < R; r++) if (ia_v[r][q].size() > maxlen) maxlen = ia_v[r][q].size();
      for (int s = 0; s < maxlen; s++) begin
        int cyc, h0;
        @(negedge clk);
        cmd_valid = 1;
        cmd = (q == 0 && s == 0) ? CMD_NEW_TILE : (s == 0) ? CMD_NEXT_CHUNK : CMD_SAME_CHUNK;
        for (int r = 0; r < R; r++) begin
          cmd_ia[r] = '0;
          if (s < ia_v[r][q].size()) begin
            cmd_ia[r].valid = 1;
            cmd_ia[r].val   = ia_v[r][q][s];
            cmd_ia[r].idx   = ia_i[r][q][s];
          end
        end
        h0 = n_hold;
        @(posedge clk);
        #1 cmd_valid = 0;
        cyc = 0;
        while (!done) begin @(posedge clk); #1; cyc++; end
        checks++;
        if (cyc != 1 + rows_of[q] + (n_hold - h0)) begin
          failures++;
          $display("FAIL rate: chunk %0d step %0d took %0d cycles, rows %0d holds %0d", q, s, cyc, rows_of[q], n_hold - h0);
        end
      end
    end
  endtask

  task automatic drain_check(int tile);
    @(negedge clk);
    while (!quiet) @(negedge clk);
    acc_bank = !acc_bank;
    for (int o = 0; o < NOC; o++) begin
      @(negedge clk);
      drain_en = 1; drain_addr = o;
      #1;
      for (int r = 0; r < R; r++) begin
        checks++;
        if (longint'($signed(drain_data[r])) != ref_ps[r][o]) begin
          failures++;
          $display("FAIL tile %0d psum[%0d][%0d]=%0d exp %0d", tile, r, o, $signed(drain_data[r]), ref_ps[r][o]);
        end
      end
    end
    @(negedge clk);
    drain_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    make_weights();
    load_weights();
    for (int t = 0; t < 3; t++) begin
      make_ia(t);
      run_tile();
      drain_check(t);
    end
    checks++;
    if (n_ops != exp_ops) begin failures++; $display("FAIL MAC ops %0d expected %0d", n_ops, exp_ops); end
    checks++;
    if (n_hold == 0 || n_ffull == 0) begin
      failures++; $display("FAIL mechanisms: holds %0d fifo-full %0d", n_hold, n_ffull);
    end
    $display("tb_pe: MAC ops %0d, held cycles %0d, FIFO-full cycles %0d", n_ops, n_hold, n_ffull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
