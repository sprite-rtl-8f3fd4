// tb_index_fifo: self-checking test of the multi-write index FIFO.
// Pushes 0..3 pairs per cycle (never more than the free space) and pops at
// random; the popped stream must equal the pushed stream in order, and the
// free count must track a reference queue.
module tb_index_fifo;
  import sprite_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] wr_n = 0;
  pair_t [2:0] wr_data;
  logic rd_en = 0;
  pair_t rd_data;
  logic empty;
  logic [2:0] free;
  pair_t q [$];
  int checks = 0, failures = 0;

  index_fifo dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      if (free != FIFO_DEPTH - q.size() || empty != (q.size() == 0)) begin
        failures++; $display("FAIL t=%0d free=%0d size=%0d", t, free, q.size());
      end
      begin
        automatic int lim = (free < 3) ? free : 3;
        wr_n = $urandom_range(0, lim);
      end
      for (int k = 0; k < 3; k++) wr_data[k] = pair_t'($urandom);
      rd_en = ($urandom_range(0, 2) != 0);
      if (rd_en && q.size() > 0) begin
        automatic pair_t e = q.pop_front();
        checks++;
        if (rd_data != e) begin failures++; $display("FAIL t=%0d data %h exp %h", t, rd_data, e); end
      end
      for (int k = 0; k < wr_n; k++) q.push_back(wr_data[k]);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
