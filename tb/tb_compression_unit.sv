// tb_compression_unit: self-checking test of activation and compression.
// Sends chunks of 32 random psums (negative, zero, small and saturating
// values; varied shifts) with random output back-pressure. Each output
// must list ReLU(psum >>> shift), saturated to 16 bits, non-zeros only, in
// channel order, with the correct count, pixel and chunk tags, and come
// out in order one cycle after acceptance at the earliest.
module tb_compression_unit;
  import sprite_pkg::*;
  localparam int CH = 32;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [CH-1:0][PSUM_W-1:0] in_psum = '0;
  logic [3:0] out_shift = 8;
  logic [15:0] in_pixel = 0, out_pixel;
  logic [5:0] in_chunk = 0, out_chunk;
  logic [5:0] out_count;
  logic signed [CH-1:0][DATA_W-1:0] out_val;
  logic [CH-1:0][4:0] out_idx;
  typedef struct { int cnt; int pix; int chk; int v[CH]; int ix[CH]; } exp_t;
  exp_t q [$];
  int checks = 0, failures = 0, n_out = 0;

  compression_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checks the output that will be taken at the next clock edge
  task automatic score();
    exp_t e;
    e = q.pop_front();
    n_out++;
    checks++;
    if (out_count != e.cnt || out_pixel != e.pix || out_chunk != e.chk) begin
      failures++; $display("FAIL count %0d/%0d pix %0d/%0d", out_count, e.cnt, out_pixel, e.pix);
    end
    for (int k = 0; k < e.cnt; k++) begin
      checks++;
      if (out_val[k] != e.v[k] || out_idx[k] != e.ix[k]) begin
        failures++; $display("FAIL entry %0d: %0d@%0d exp %0d@%0d", k, out_val[k], out_idx[k], e.v[k], e.ix[k]);
      end
    end
  endtask

  initial begin
    int sent;
    sent = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (sent < 1500) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) score();
      begin
        in_valid = $urandom_range(0, 1);
        if (in_valid && in_ready) begin
          exp_t e;
          out_shift = $urandom_range(0, 8);
          in_pixel = $urandom; in_chunk = $urandom;
          e.cnt = 0; e.pix = in_pixel; e.chk = in_chunk;
          for (int c = 0; c < CH; c++) begin
            int kind, v, a;
            kind = $urandom_range(0, 3);
            case (kind)
              0: v = -$urandom_range(0, 100000);
              1: v = 0;
              2: v = $urandom_range(0, 3000);
              default: v = $urandom_range(0, 8388607);
            endcase
            in_psum[c] = PSUM_W'(v);
            a = (v <= 0) ? 0 : (v >>> out_shift);
            if (a > 32767) a = 32767;
            if (a != 0) begin e.v[e.cnt] = a; e.ix[e.cnt] = c; e.cnt++; end
          end
          q.push_back(e);
          sent++;
        end
      end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    #1;
    if (out_valid) score();
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != sent) begin failures++; $display("FAIL outputs %0d sent %0d", n_out, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
