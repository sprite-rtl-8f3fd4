// mw_prio_enc: multi-way (P-way) priority encoder for one IMU row.
//
// Finds the first P set bits, lowest index first, of an N-bit request
// vector (the still-unserved matches of one 1 x imu_col comparator row).
// It works like P priority encoders in series: each stage takes the lowest
// set bit and clears it for the next stage. The paper uses P = 3 as the
// trade-off between matches served per cycle and critical-path delay.
//
// Interface (purely combinational):
//   req        request bits
//   sel_valid  sel_valid[k] = a k-th set bit exists
//   sel_idx    position of the k-th set bit
//   sel_mask   OR of the one-hot picks (bits served this cycle)
//   count      number of picks (0..P)
module mw_prio_enc #(
  parameter int unsigned N = 32,
  parameter int unsigned P = 3
) (
  input  logic [N-1:0]                  req,
  output logic [P-1:0]                  sel_valid,
  output logic [P-1:0][$clog2(N)-1:0]   sel_idx,
  output logic [N-1:0]                  sel_mask,
  output logic [$clog2(P+1)-1:0]        count
);

  logic [N-1:0] rem;

  always_comb begin
    rem       = req;
    sel_valid = '0;
    sel_idx   = '0;
    sel_mask  = '0;
    count     = '0;
    for (int k = 0; k < P; k++) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (rem[i]) sel_idx[k] = i[$clog2(N)-1:0];
      end
      if (rem != '0) begin
        sel_valid[k]           = 1'b1;
        sel_mask[sel_idx[k]]   = 1'b1;
        rem[sel_idx[k]]        = 1'b0;
        count                  = count + 1'b1;
      end
    end
  end

endmodule
