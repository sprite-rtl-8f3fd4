// tb_psum_buffer: self-checking test of the double-banked psum buffer.
// Accumulates random writes into the active bank while the other bank is
// drained (read and cleared) and checks both against a reference model,
// across several bank swaps.
module tb_psum_buffer;
  import sprite_pkg::*;
  localparam int D = PSUM_BANK_DEPTH;
  logic clk = 0, rst_n = 0;
  logic acc_bank = 0, acc_en = 0, drain_en = 0;
  logic [$clog2(D)-1:0] acc_addr = 0, drain_addr = 0;
  logic signed [PSUM_W-1:0] acc_wr_data = 0, acc_rd_data, drain_data;
  int model [2][D];
  int checks = 0, failures = 0;

  psum_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < D; i++) model[b][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int sw = 0; sw < 6; sw++) begin
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        acc_en      = $urandom_range(0, 1);
        acc_addr    = $urandom_range(0, D - 1);
        acc_wr_data = PSUM_W'($urandom_range(0, 100000)) - 24'sd50000;
        drain_en    = $urandom_range(0, 1);
        drain_addr  = $urandom_range(0, D - 1);
        #1;
        checks += 2;
        if (acc_rd_data != PSUM_W'(model[acc_bank][acc_addr])) begin
          failures++; $display("FAIL acc read bank %0d addr %0d", acc_bank, acc_addr);
        end
        if (drain_data != PSUM_W'(model[!acc_bank][drain_addr])) begin
          failures++; $display("FAIL drain read addr %0d: %0d exp %0d", drain_addr, drain_data, model[!acc_bank][drain_addr]);
        end
        @(posedge clk);
        if (acc_en)   model[acc_bank][acc_addr] = int'(acc_wr_data);
        if (drain_en) model[!acc_bank][drain_addr] = 0;
      end
      @(negedge clk);
      acc_en = 0; drain_en = 0;
      acc_bank = !acc_bank;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
