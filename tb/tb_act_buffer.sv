// tb_act_buffer: self-checking test of the banked activation buffer.
// Fills every bank with random entries, then reads all banks in parallel
// at independent addresses with independent read enables and checks the
// one-cycle latency and the hold behaviour.
module tb_act_buffer;
  import sprite_pkg::*;
  localparam int B = IMU_ROW, D = 512;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [2:0] wr_bank = 0;
  logic [$clog2(D)-1:0] wr_addr = 0;
  ia_entry_t wr_data = '0;
  logic [B-1:0] ren = 0;
  logic [B-1:0][$clog2(D)-1:0] raddr = '0;
  ia_entry_t [B-1:0] rdata, exp_d;
  ia_entry_t model [B][D];
  int checks = 0, failures = 0;

  act_buffer #(.BANKS(B), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < B; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = b; wr_addr = a;
        wr_data = ia_entry_t'($urandom);
        model[b][a] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    exp_d = rdata;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int b = 0; b < B; b++) begin
        ren[b] = $urandom_range(0, 1);
        raddr[b] = $urandom_range(0, D - 1);
        if (ren[b]) exp_d[b] = model[b][raddr[b]];
      end
      @(posedge clk); #1;
      checks++;
      if (rdata != exp_d) begin failures++; $display("FAIL t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
