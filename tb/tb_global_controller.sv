// tb_global_controller: self-checking test of the layer sequencer.
//
// The activation buffer is real; the PE array is replaced by a model that
// answers every command with done after a random number of cycles (a
// different one per PE) and reports quiet a little later. The testbench
// lays out random activation lists (tiles x chunks x pixels) and checks:
// the commands (type and broadcast activations) against the expected
// step sequence; that no command is given while a PE is busy; the drain
// order, the pixel/chunk tags and the bank swaps; that drain reads happen
// only when the compression unit is ready; and the done pulse. The
// compression unit is slow (random ready) so finished tiles must wait for
// the previous drain at least once.
module tb_global_controller;
  import sprite_pkg::*;
  localparam int NP = 4, R = IMU_ROW, D = 512;
  localparam int NT = 3, NCH = 2, NOC = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [R-1:0] ia_ren;
  logic [R-1:0][$clog2(D)-1:0] ia_raddr;
  ia_entry_t [R-1:0] ia_rdata;
  logic pe_cmd_valid;
  pe_cmd_e pe_cmd;
  ia_entry_t [R-1:0] pe_cmd_ia;
  logic [NP-1:0] pe_done, pe_quiet;
  logic acc_bank, drain_en, cu_valid, cu_ready = 0;
  logic [OC_W-1:0] drain_addr, cu_chunk;
  logic [15:0] cu_pixel;
  logic ev_drain_wait, ev_step;

  logic wr_en = 0;
  logic [2:0] wr_bank = 0;
  logic [$clog2(D)-1:0] wr_addr = 0;
  ia_entry_t wr_data = '0;

  act_buffer #(.BANKS(R), .DEPTH(D)) u_ab (
    .clk, .rst_n, .wr_en, .wr_bank, .wr_addr, .wr_data,
    .ren(ia_ren), .raddr(ia_raddr), .rdata(ia_rdata));

  global_controller #(.NUM_PES(NP), .ROWS(R), .IA_DEPTH(D), .PIX_W(16)) dut (
    .clk, .rst_n, .start,
    .cfg_num_tiles(16'(NT)), .cfg_num_chunks(8'(NCH)), .cfg_num_oc(7'(NOC)),
    .busy, .done, .ia_ren, .ia_raddr, .ia_rdata,
    .pe_cmd_valid, .pe_cmd, .pe_cmd_ia, .pe_done, .pe_quiet,
    .acc_bank, .drain_en, .drain_addr,
    .cu_valid, .cu_ready, .cu_pixel, .cu_chunk, .ev_drain_wait, .ev_step);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ia_entry_t lists [NT][NCH][R][$];
  typedef struct { pe_cmd_e c; ia_entry_t [R-1:0] ia; } step_t;
  step_t exp_steps [$];
  int n_drain = 0, n_wait = 0, n_done = 0, bank_flips = 0;

  // PE model
  int cnt [NP];
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (pe_cmd_valid) cnt[p] <= $urandom_range(3, 9);
      else if (cnt[p] > 0) cnt[p] <= cnt[p] - 1;
    end
  end
  always_comb for (int p = 0; p < NP; p++) begin
    pe_done[p]  = (cnt[p] <= 1);
    pe_quiet[p] = (cnt[p] == 0);
  end

  initial for (int p = 0; p < NP; p++) cnt[p] = 0;

  // monitors
  logic prev_bank = 0;
  always @(posedge clk) if (rst_n) begin
    if (pe_cmd_valid) begin
      step_t e;
      checks++;
      if (!(&pe_done)) begin failures++; $display("FAIL command while a PE is busy"); end
      if (exp_steps.size() == 0) begin
        failures++; $display("FAIL unexpected command");
      end else begin
        e = exp_steps.pop_front();
        checks++;
        if (pe_cmd != e.c) begin failures++; $display("FAIL cmd %s exp %s", pe_cmd.name(), e.c.name()); end
        for (int r = 0; r < R; r++) begin
          checks++;
          if (pe_cmd_ia[r].valid != e.ia[r].valid ||
              (e.ia[r].valid && (pe_cmd_ia[r].val != e.ia[r].val || pe_cmd_ia[r].idx != e.ia[r].idx))) begin
            failures++; $display("FAIL ia row %0d", r);
          end
        end
      end
    end
    if (drain_en) begin
      int tl, oc;
      tl = n_drain / NOC; oc = n_drain % NOC;
      checks++;
      if (!cu_ready || !cu_valid || drain_addr != oc || cu_chunk != oc || cu_pixel != tl * R) begin
        failures++; $display("FAIL drain %0d: addr %0d pix %0d", n_drain, drain_addr, cu_pixel);
      end
      n_drain++;
    end
    if (acc_bank != prev_bank) bank_flips++;
    prev_bank <= acc_bank;
    n_wait += ev_drain_wait;
    n_done += done;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cu_ready <= ($urandom_range(0, 19) == 0);

  initial begin
    int addr [R];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) addr[r] = 0;
    // build and store lists
    for (int t = 0; t < NT; t++)
      for (int q = 0; q < NCH; q++) begin
        int maxlen = 0;
        for (int r = 0; r < R; r++) begin
          int len = $urandom_range(0, 4);
          if (len == 0) begin
            ia_entry_t e = '0;
            e.last = 1;
            lists[t][q][r].push_back(e);
          end else
            for (int k = 0; k < len; k++) begin
              ia_entry_t e;
              e.valid = 1; e.last = (k == len - 1);
              e.idx = $urandom; e.val = $urandom;
              lists[t][q][r].push_back(e);
            end
          if (lists[t][q][r].size() > maxlen) maxlen = lists[t][q][r].size();
          foreach (lists[t][q][r][k]) begin
            @(negedge clk);
            wr_en = 1; wr_bank = r; wr_addr = addr[r]; wr_data = lists[t][q][r][k];
            addr[r]++;
          end
        end
        for (int s = 0; s < maxlen; s++) begin
          step_t st;
          st.c = (q == 0 && s == 0) ? CMD_NEW_TILE : (s == 0) ? CMD_NEXT_CHUNK : CMD_SAME_CHUNK;
          for (int r = 0; r < R; r++) begin
            st.ia[r] = '0;
            if (s < lists[t][q][r].size()) st.ia[r] = lists[t][q][r][s];
          end
          exp_steps.push_back(st);
        end
      end
    @(negedge clk);
    wr_en = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (exp_steps.size() != 0 || busy) begin failures++; $display("FAIL %0d steps never issued", exp_steps.size()); end
    checks++;
    if (n_drain != NT * NOC) begin failures++; $display("FAIL drained %0d", n_drain); end
    checks++;
    if (bank_flips != NT) begin failures++; $display("FAIL bank swaps %0d", bank_flips); end
    checks++;
    if (n_wait == 0 || n_done != 1) begin failures++; $display("FAIL drain waits %0d done pulses %0d", n_wait, n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
