// tb_imu: self-checking test of the index-matching unit.
// Loads random IA and weight index sets (varied density of valid entries)
// and compares the 7 x 32 match matrix with a reference comparison; also
// checks that the buffers hold when no load is given.
module tb_imu;
  import sprite_pkg::*;
  localparam int R = IMU_ROW, C = IMU_COL;
  logic clk = 0, rst_n = 0;
  logic ia_load = 0, w_load = 0, w_last_in = 0;
  ia_entry_t [R-1:0] ia_in, ia_q;
  w_entry_t  [C-1:0] w_in, w_q;
  logic w_last_q;
  logic [R-1:0][C-1:0] match, expm;
  int checks = 0, failures = 0;

  imu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ia_in = '0; w_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      ia_load = ($urandom_range(0, 3) != 0);
      w_load  = ($urandom_range(0, 3) != 0);
      w_last_in = $urandom_range(0, 1);
      for (int r = 0; r < R; r++) begin
        ia_in[r].valid = $urandom_range(0, 7) != 0;
        ia_in[r].idx   = $urandom_range(0, IC_CHUNK - 1);
        ia_in[r].val   = $urandom;
        ia_in[r].last  = 0;
      end
      for (int c = 0; c < C; c++) begin
        w_in[c].valid = $urandom_range(0, 7) != 0;
        w_in[c].idx   = $urandom_range(0, IC_CHUNK - 1);
        w_in[c].oc    = $urandom;
        w_in[c].val   = $urandom;
      end
      begin
        ia_entry_t [R-1:0] ia_exp;
        w_entry_t  [C-1:0] w_exp;
        ia_exp = ia_load ? ia_in : ia_q;
        w_exp  = w_load ? w_in : w_q;
        @(posedge clk); #1;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            expm[r][c] = ia_exp[r].valid && w_exp[c].valid && ia_exp[r].idx == w_exp[c].idx;
        checks++;
        if (ia_q != ia_exp || w_q != w_exp) begin failures++; $display("FAIL buffers t=%0d", t); end
        checks++;
        if (match != expm) begin failures++; $display("FAIL match t=%0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
