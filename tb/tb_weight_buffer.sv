// tb_weight_buffer: self-checking test of one PE's weight buffer.
// Writes random rows slot by slot (with last flags), then reads rows in
// random order with random read enables, checking the one-cycle read
// latency and that the output holds when ren is low.
module tb_weight_buffer;
  import sprite_pkg::*;
  localparam int ROWS = 256;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_last = 0, ren = 0, rlast;
  logic [7:0] wr_row = 0, raddr = 0;
  logic [4:0] wr_slot = 0;
  w_entry_t wr_entry = '0;
  w_entry_t [IMU_COL-1:0] rdata, exp_row;
  w_entry_t model [ROWS][IMU_COL];
  logic model_last [ROWS];
  logic exp_last;
  int checks = 0, failures = 0;

  weight_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < IMU_COL; s++) begin
        @(negedge clk);
        wr_en = 1; wr_row = r; wr_slot = s;
        wr_entry = w_entry_t'($urandom);
        wr_last = $urandom_range(0, 1);
        model[r][s] = wr_entry;
        if (s == 0) model_last[r] = wr_last;
      end
    @(negedge clk); wr_en = 0;
    exp_row = rdata; exp_last = rlast;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ren = $urandom_range(0, 1);
      raddr = $urandom_range(0, ROWS - 1);
      if (ren) begin
        for (int s = 0; s < IMU_COL; s++) exp_row[s] = model[raddr][s];
        exp_last = model_last[raddr];
      end
      @(posedge clk); #1;
      checks++;
      if (rdata != exp_row || rlast != exp_last) begin
        failures++; $display("FAIL t=%0d row %0d ren %b", t, raddr, ren);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
