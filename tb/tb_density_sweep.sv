// tb_density_sweep: the core across input/weight densities 0.1 .. 0.5.
//
// For each density d (the same for activations and weights) a random sparse
// 1x1 layer is loaded into an 8-PE core (64 output channels per PE, 512 in
// all; 2 chunks of 32 input channels; 4 tiles of 7 pixels) and run once.
// Every output chunk is checked against a dense reference, and the MAC
// count against the number of matching pairs. The testbench prints the MAC
// utilisation of the compute phase (cycles until the last tile's psums are
// complete) per density, which must reach 25 %.
// The property the architecture is built on is checked directly: a full
// weight row holds 32 non-zeros whose channel indices are spread over the
// 32 channels of the chunk, so an activation meets on average one matching
// weight per weight-row cycle, whatever the density. The testbench counts
// row-cycles (a PE streaming weights, an IMU row holding a valid
// activation) and requires MAC operations per row-cycle to lie between 0.7
// and 1.3 at every density (below 1 only by partly filled last rows of a
// chunk and held cycles).
module tb_density_sweep;
  import sprite_pkg::*;
  localparam int R = IMU_ROW;
  localparam int N_PE = 8, WR = 256, IAD = 4096;
  localparam int NT = 4, NCH = 2, NOC_L = 64;
  localparam int C = IMU_COL, NOC = N_PE * NOC_L, SHIFT = 3;
  localparam int ND = 5;

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
  logic start = 0, busy, done, out_valid, out_ready = 1;
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
  int n_out;
  longint exp_ops;
  int compute_cycles;
  bit counting = 0;
  real util [ND];
  longint row_cycles;

  // row-cycles: PE streaming (state S_RUN) x IMU rows with a valid activation
  int rc_now [N_PE];
  for (genvar p = 0; p < N_PE; p++) begin : g_rc
    always_comb begin
      rc_now[p] = 0;
      if (dut.g_pe[p].u_pe.state == 2'd2)
        for (int r = 0; r < R; r++) rc_now[p] += int'(dut.g_pe[p].u_pe.ia_q[r].valid);
    end
  end
  always @(posedge clk) if (counting) for (int p = 0; p < N_PE; p++) row_cycles += rc_now[p];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compute phase: from start until the controller leaves the tile loop
  always @(posedge clk) if (counting) begin
    if (dut.u_ctrl.state == 2'd3) counting <= 0;
    else compute_cycles++;
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

  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int L = 0; L < R; L++) begin
        int pix, k, n;
        pix = out_pixel + L; k = out_chunk; n = 0;
        for (int p = 0; p < N_PE; p++) begin
          int e;
          e = expect_act(pix, k * N_PE + p);
          if (e != 0) begin
            checks++;
            if (n >= out_count[L] || out_idx[L][n] != p || out_val[L][n] != e) begin
              failures++;
              $display("FAIL pixel %0d oc %0d: got %0d exp %0d", pix, k * N_PE + p, out_val[L][n], e);
            end
            n++;
          end
        end
        checks++;
        if (n != out_count[L]) begin failures++; $display("FAIL pixel %0d chunk %0d count", pix, k); end
        n_out++;
      end
    end
  end

  task automatic make_layer(int pct);
    exp_ops = 0;
    for (int o = 0; o < NOC; o++)
      for (int q = 0; q < NCH; q++)
        for (int i = 0; i < C; i++)
          w[o][q][i] = ($urandom_range(0, 99) < pct) ? ($urandom_range(0, 600) - 280) : 0;
    for (int px = 0; px < NT * R; px++)
      for (int q = 0; q < NCH; q++)
        for (int i = 0; i < C; i++)
          ia[px][q][i] = ($urandom_range(0, 99) < pct) ? $urandom_range(1, 400) : 0;
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int di = 0; di < ND; di++) begin
      int pct;
      pct = 10 * (di + 1);
      make_layer(pct);
      load_ia();
      load_w();
      n_out = 0;
      compute_cycles = 0;
      row_cycles = 0;
      @(negedge clk);
      start = 1;
      counting = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      while (out_valid) @(negedge clk);
      repeat (2) @(negedge clk);
      checks++;
      if (n_out != NT * R * NOC_L) begin failures++; $display("FAIL d=0.%0d: %0d outputs", di + 1, n_out); end
      checks++;
      if (longint'(stat_mac_ops) != exp_ops) begin failures++; $display("FAIL d=0.%0d: MAC ops %0d exp %0d", di + 1, stat_mac_ops, exp_ops); end
      util[di] = real'(stat_mac_ops) / (real'(compute_cycles) * N_PE * R);
      $display("density 0.%0d: %0d MAC ops in %0d compute cycles, utilisation %0.1f%%, held %0d, FIFO full %0d, drain wait %0d, steps %0d",
               di + 1, stat_mac_ops, compute_cycles, 100.0 * util[di], stat_hold, stat_fifo_full, stat_drain_wait, stat_ia_steps);
      begin
        real mpr;
        mpr = real'(stat_mac_ops) / real'(row_cycles);
        $display("             matches per activation per weight-row cycle %0.2f", mpr);
        checks++;
        if (mpr < 0.7 || mpr > 1.3) begin failures++; $display("FAIL matching rate not near one"); end
      end
      checks++;
      if (util[di] < 0.25) begin failures++; $display("FAIL utilisation too low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
