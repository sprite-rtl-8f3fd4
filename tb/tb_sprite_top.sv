// tb_sprite_top: end-to-end test of the SPRITE core at reduced size (8 PEs, small buffers).
//
// Builds a random sparse 1x1 convolution layer: NT tiles of 7 output
// pixels, NCH input-channel chunks of 32 channels, NOC_L output channels
// per PE (NOC_L * N_PE in all, PE p owning channels p, p + N_PE, ...).
// Activations are written compressed into the activation-buffer banks and
// weights compressed into each PE's weight buffer through the loader
// ports; one pass is started, and every compressed output chunk is compared
// with ReLU((sum of (ia * w) >>> 8) >>> shift), computed here in plain
// integers from the dense tensors.
// Chunk 0 is moderately sparse, chunk 1 very sparse, and chunk 2 (when
// present) concentrates weights and activations on channels 0..3, which
// produces rows with more than 3 matches and full index FIFOs. Tile 1 has
// almost no activations, so its short computation must wait for the drain
// of tile 0 (a slow, randomly stalling output consumer is used).
// Counted mechanisms, each of which must occur: held weight rows, full
// FIFOs, drain waits, output back-pressure, psum bank swaps, all three
// step commands (new tile, next chunk, same chunk) and empty output chunks.
// The MAC operation counter must equal the number of matching pairs.
module tb_sprite_top;
  import sprite_pkg::*;
  localparam int R = IMU_ROW;
  localparam int N_PE = 8, WR = 64, IAD = 2048;
  localparam int NT = 3, NCH = 3, NOC_L = 12;
  localparam int C = IMU_COL, NOC = N_PE * NOC_L, SHIFT = 2;

  logic clk = 0, rst_n = 0;
  logic ia_wr_en = 0;
  logic [2:0] ia_wr_bank = 0;
  logic [$clog2(IAD)-1:0] ia_wr_addr = 0;
  ia_entry_t ia_wr_data = '0;
  logic w_wr_en = 0, w_wr_last = 0;
  logic [$clog2(N_PE)-1:0] w_wr_pe = 0;
  logic [$clog2(WR)-1:0] w_wr_row = 0;
  logic [4:0] w_wr_slot = 0;
  w_entry_t w_wr_entry = '0;
  logic start = 0, busy, done, out_valid, out_ready = 0;
  logic [15:0] out_pixel;
  logic [OC_W-1:0] out_chunk;
  logic [R-1:0][$clog2(N_PE+1)-1:0] out_count;
  logic [R-1:0][N_PE-1:0][DATA_W-1:0] out_val;
  logic [R-1:0][N_PE-1:0][$clog2(N_PE)-1:0] out_idx;
  logic [31:0] stat_cycles, stat_mac_ops, stat_ia_steps, stat_hold, stat_fifo_full, stat_drain_wait;

  sprite_top #(.N_PE(N_PE), .W_ROWS(WR), .IA_DEPTH(IAD)) dut (
    .clk, .rst_n, .ia_wr_en, .ia_wr_bank, .ia_wr_addr, .ia_wr_data,
    .w_wr_en, .w_wr_pe, .w_wr_row, .w_wr_slot, .w_wr_entry, .w_wr_last,
    .start, .cfg_num_tiles(16'(NT)), .cfg_num_chunks(8'(NCH)), .cfg_num_oc(7'(NOC_L)),
    .cfg_out_shift(4'(SHIFT)), .busy, .done,
    .out_valid, .out_ready, .out_pixel, .out_chunk, .out_count, .out_val, .out_idx,
    .stat_cycles, .stat_mac_ops, .stat_ia_steps, .stat_hold, .stat_fifo_full, .stat_drain_wait);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int w [NOC][NCH][C];
  int ia [NT*R][NCH][C];
  int n_out = 0, n_bp = 0, n_empty = 0, n_swaps = 0, n_new = 0, n_next = 0, n_same = 0;
  longint exp_ops = 0;
  bit seen [NT*R][NOC_L];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters taken from inside the core
  logic prev_bank = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.acc_bank != prev_bank) n_swaps++;
    prev_bank <= dut.acc_bank;
    if (dut.pe_cmd_valid) begin
      if (dut.pe_cmd == CMD_NEW_TILE) n_new++;
      else if (dut.pe_cmd == CMD_NEXT_CHUNK) n_next++;
      else n_same++;
    end
  end

  function automatic int expect_act(int pix, int oc);
    longint s = 0;
    for (int q = 0; q < NCH; q++)
      for (int i = 0; i < C; i++)
        if (ia[pix][q][i] != 0) s += (longint'(ia[pix][q][i]) * w[oc][q][i]) >>> 8;
    if (s <= 0) return 0;
    s = s >>> SHIFT;
    if (s > 32767) s = 32767;
    return int'(s);
  endfunction

  // output consumer: slow, random ready; checks each chunk that the next
  // clock edge takes
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) == 0);
    if (rst_n && out_valid && out_ready) begin
      for (int L = 0; L < R; L++) begin
        int pix, k, n;
        pix = out_pixel + L; k = out_chunk; n = 0;
        checks++;
        if (pix >= NT * R || k >= NOC_L || seen[pix][k]) begin
          failures++; $display("FAIL bad or repeated output pixel %0d chunk %0d", pix, k);
        end else begin
          seen[pix][k] = 1;
          for (int p = 0; p < N_PE; p++) begin
            int e;
            e = expect_act(pix, k * N_PE + p);
            if (e != 0) begin
              checks++;
              if (n >= out_count[L] || out_idx[L][n] != p || out_val[L][n] != e) begin
                failures++;
                $display("FAIL pixel %0d oc %0d: got %0d@%0d exp %0d", pix, k * N_PE + p, out_val[L][n], out_idx[L][n], e);
              end
              n++;
            end
          end
          checks++;
          if (n != out_count[L]) begin failures++; $display("FAIL pixel %0d chunk %0d count %0d exp %0d", pix, k, out_count[L], n); end
          if (n == 0) n_empty++;
        end
        n_out++;
      end
    end
    if (out_valid && !out_ready) n_bp++;
  end

  task automatic make_layer();
    for (int o = 0; o < NOC; o++)
      for (int q = 0; q < NCH; q++)
        for (int i = 0; i < C; i++) begin
          bit nz;
          if (q == 0)      nz = $urandom_range(0, 99) < 30;
          else if (q == 1) nz = $urandom_range(0, 99) < 6;
          else             nz = (i < 4);
          w[o][q][i] = nz ? ($urandom_range(0, 600) - 250) : 0;
        end
    for (int px = 0; px < NT * R; px++)
      for (int q = 0; q < NCH; q++)
        for (int i = 0; i < C; i++) begin
          bit nz;
          if (px / R == 1)  nz = (q == 0) && (i == px % R);
          else if (q == 2)  nz = (i < 4);
          else              nz = $urandom_range(0, 99) < 40;
          ia[px][q][i] = nz ? $urandom_range(1, 400) : 0;
        end
    for (int px = 0; px < NT * R; px++)
      for (int o = 0; o < NOC; o++)
        for (int q = 0; q < NCH; q++)
          for (int i = 0; i < C; i++)
            if (ia[px][q][i] != 0 && w[o][q][i] != 0) exp_ops++;
  endtask

  task automatic load_ia();
    int addr [R];
    for (int r = 0; r < R; r++) addr[r] = 0;
    for (int t = 0; t < NT; t++)
      for (int q = 0; q < NCH; q++)
        for (int r = 0; r < R; r++) begin
          int px, nnz, k;
          px = t * R + r; nnz = 0; k = 0;
          for (int i = 0; i < C; i++) if (ia[px][q][i] != 0) nnz++;
          if (nnz == 0) begin
            @(negedge clk);
            ia_wr_en = 1; ia_wr_bank = r; ia_wr_addr = addr[r]; addr[r]++;
            ia_wr_data = '0; ia_wr_data.last = 1;
          end
          for (int i = 0; i < C; i++)
            if (ia[px][q][i] != 0) begin
              @(negedge clk);
              ia_wr_en = 1; ia_wr_bank = r; ia_wr_addr = addr[r]; addr[r]++;
              ia_wr_data.valid = 1; ia_wr_data.last = (k == nnz - 1);
              ia_wr_data.idx = i; ia_wr_data.val = ia[px][q][i];
              k++;
            end
        end
    @(negedge clk);
    ia_wr_en = 0;
  endtask

  task automatic load_w();
    for (int p = 0; p < N_PE; p++) begin
      int row;
      row = 0;
      for (int q = 0; q < NCH; q++) begin
        w_entry_t list [$];
        int nrows;
        for (int k = 0; k < NOC_L; k++)
          for (int i = 0; i < C; i++)
            if (w[k * N_PE + p][q][i] != 0) begin
              w_entry_t e;
              e.valid = 1; e.oc = k; e.idx = i; e.val = w[k * N_PE + p][q][i];
              list.push_back(e);
            end
        nrows = (list.size() + C - 1) / C;
        if (nrows == 0) nrows = 1;
        for (int rr = 0; rr < nrows; rr++)
          for (int s = 0; s < C; s++) begin
            @(negedge clk);
            w_wr_en = 1; w_wr_pe = p; w_wr_row = row + rr; w_wr_slot = s;
            w_wr_entry = (rr * C + s < list.size()) ? list[rr * C + s] : '0;
            w_wr_last = (rr == nrows - 1);
          end
        row += nrows;
      end
    end
    @(negedge clk);
    w_wr_en = 0;
  endtask

  initial begin
    for (int px = 0; px < NT * R; px++) for (int k = 0; k < NOC_L; k++) seen[px][k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    make_layer();
    load_ia();
    load_w();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    while (out_valid) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (n_out != NT * R * NOC_L) begin failures++; $display("FAIL %0d output chunks, expected %0d", n_out, NT * R * NOC_L); end
    checks++;
    if (longint'(stat_mac_ops) != exp_ops) begin failures++; $display("FAIL MAC ops %0d expected %0d", stat_mac_ops, exp_ops); end
    $display("%0d cycles, %0d IA steps, %0d MAC ops (%0.1f%% of %0d MACs), held %0d, FIFO full %0d, drain waits %0d",
             stat_cycles, stat_ia_steps, stat_mac_ops,
             100.0 * real'(stat_mac_ops) / (real'(stat_cycles) * N_PE * R), N_PE * R,
             stat_hold, stat_fifo_full, stat_drain_wait);
    $display("back-pressure %0d, bank swaps %0d, commands new/next/same %0d/%0d/%0d, empty chunks %0d",
             n_bp, n_swaps, n_new, n_next, n_same, n_empty);
    checks++;
    if (stat_hold == 0 || stat_fifo_full == 0 || stat_drain_wait == 0 || n_bp == 0 || n_swaps != NT ||
        n_new != NT || n_next == 0 || n_same == 0 || n_empty == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
