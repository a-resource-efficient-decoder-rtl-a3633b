// tb_scl_path_select: random candidate metrics (many ties) and valid masks;
// the survivors must be exactly the L smallest valid metrics in ascending
// order, ties resolved by the lower candidate index, worked out by sorting.
module tb_scl_path_select;
  import polar_pkg::*;
  localparam int L = 8;
  logic [2*L-1:0] cand_valid;
  pm_t cand_pm [2*L];
  logic [L-1:0] out_valid;
  logic [$clog2(2*L)-1:0] out_idx [L];
  pm_t out_pm [L];
  int checks = 0, failures = 0;
  scl_path_select #(.L(L)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int order[$];
    int tmp, nv;
    for (int t = 0; t < 3000; t++) begin
      cand_valid = 16'($urandom);
      if (t % 5 == 0) cand_valid = 16'hffff;
      for (int i = 0; i < 2*L; i++) cand_pm[i] = pm_t'((t % 2) ? $urandom_range(0, 6) : $urandom_range(0, 4095));
      #1;
      // selection sort of the valid indices by (pm, index)
      order.delete();
      for (int i = 0; i < 2*L; i++) if (cand_valid[i]) order.push_back(i);
      for (int i = 0; i < order.size(); i++)
        for (int j = i + 1; j < order.size(); j++)
          if (cand_pm[order[j]] < cand_pm[order[i]] ||
              (cand_pm[order[j]] == cand_pm[order[i]] && order[j] < order[i])) begin
            tmp = order[i]; order[i] = order[j]; order[j] = tmp;
          end
      nv = order.size() < L ? order.size() : L;
      for (int r = 0; r < L; r++) begin
        checks++;
        if (out_valid[r] !== (r < nv)) begin failures++; $display("FAIL valid slot %0d", r); end
        else if (r < nv && (int'(out_idx[r]) != order[r] || out_pm[r] != cand_pm[order[r]])) begin
          failures++;
          $display("FAIL slot %0d got idx %0d exp %0d", r, out_idx[r], order[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
