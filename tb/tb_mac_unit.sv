// tb_mac_unit: self-checking test of the MAC.
// The testbench plays the psum buffer (an array read combinationally and
// written on acc_en). Random pairs, including bursts to one channel and
// large operands that drive the 24-bit psum into saturation, are fed one
// per cycle; the final psums must equal a reference that shifts each
// product by 8 and saturates every addition. The write for a pair must
// appear exactly one cycle after the pair is presented.
module tb_mac_unit;
  import sprite_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pair_t in_pair;
  logic acc_en, busy;
  logic [OC_W-1:0] acc_addr;
  logic signed [PSUM_W-1:0] acc_rd_data, acc_wr_data;
  logic signed [PSUM_W-1:0] mem [64];
  longint ref_ps [64];
  int checks = 0, failures = 0;
  int n_sent = 0, n_writes = 0;
  logic prev_valid = 0;
  logic [OC_W-1:0] prev_oc;

  mac_unit dut (.*);
  always #5 clk = ~clk;
  assign acc_rd_data = mem[acc_addr];

  always_ff @(posedge clk) begin
    if (acc_en && rst_n) begin
      mem[acc_addr] <= acc_wr_data;
      n_writes++;
    end
    if (rst_n) begin
      checks++;
      if (acc_en != prev_valid || (acc_en && acc_addr != prev_oc)) begin
        failures++; $display("FAIL latency: acc_en=%b expected %b", acc_en, prev_valid);
      end
    end
    prev_valid <= in_valid;
    prev_oc    <= in_pair.oc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat24(longint v);
    if (v > 64'sd8388607) return 64'sd8388607;
    if (v < -64'sd8388608) return -64'sd8388608;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin mem[i] = '0; ref_ps[i] = 0; end
    in_pair = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_pair.oc = (t % 7 < 3) ? 6'd5 : OC_W'($urandom_range(0, 63));
      if (t > 2000 && in_pair.oc < 4) begin
        in_pair.ia = 16'sh7fff; in_pair.w = (in_pair.oc[0]) ? 16'sh7fff : -16'sh7fff;
      end else begin
        in_pair.ia = DATA_W'($urandom_range(0, 2000));
        in_pair.w  = DATA_W'($urandom_range(0, 4000)) - 16'sd2000;
      end
      if (in_valid) begin
        automatic longint pr = (longint'(in_pair.ia) * longint'(in_pair.w)) >>> 8;
        ref_ps[in_pair.oc] = sat24(ref_ps[in_pair.oc] + pr);
        n_sent++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (longint'(mem[i]) != ref_ps[i]) begin
        failures++; $display("FAIL psum[%0d]=%0d exp %0d", i, mem[i], ref_ps[i]);
      end
    end
    checks++;
    if (n_writes != n_sent) begin failures++; $display("FAIL writes %0d sent %0d", n_writes, n_sent); end
    checks++;
    if (ref_ps[1] != 64'sd8388607 || ref_ps[0] != -64'sd8388608) begin
      failures++; $display("FAIL saturation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
