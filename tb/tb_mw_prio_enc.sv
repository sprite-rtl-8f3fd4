// tb_mw_prio_enc: self-checking test of the 3-way priority encoder.
// Applies corner vectors and random vectors of varied density and compares
// picks, mask and count with a reference that scans the bits in order.
module tb_mw_prio_enc;
  localparam int N = 32;
  localparam int P = 3;
  logic [N-1:0]                req;
  logic [P-1:0]                sel_valid;
  logic [P-1:0][$clog2(N)-1:0] sel_idx;
  logic [N-1:0]                sel_mask;
  logic [$clog2(P+1)-1:0]      count;
  int checks = 0, failures = 0;

  mw_prio_enc #(.N(N), .P(P)) dut (.*);

  task automatic check(logic [N-1:0] v);
    int n = 0;
    logic [N-1:0] m = '0;
    int idx [P];
    for (int i = 0; i < N && n < P; i++) if (v[i]) begin idx[n] = i; m[i] = 1'b1; n++; end
    req = v;
    #1;
    checks++;
    if (count != n || sel_mask != m) begin
      failures++;
      $display("FAIL req=%h count=%0d/%0d mask=%h/%h", v, count, n, sel_mask, m);
    end
    for (int k = 0; k < P; k++) begin
      checks++;
      if (sel_valid[k] != (k < n) || (k < n && sel_idx[k] != idx[k])) begin
        failures++;
        $display("FAIL req=%h pick %0d valid=%b idx=%0d", v, k, sel_valid[k], sel_idx[k]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(32'h8000_0000);
    check(32'h0000_0001);
    check(32'hC000_0001);
    for (int t = 0; t < 3000; t++) begin
      automatic logic [N-1:0] v = 0;
      automatic int dens = $urandom_range(1, 16);
      for (int i = 0; i < N; i++) v[i] = ($urandom_range(0, 31) < dens);
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
