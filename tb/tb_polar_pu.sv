// tb_polar_pu: exhaustive-ish check of the processing unit: random LLR pairs
// (including the range ends) for both functions and both partial sums,
// against integer min-sum F and saturating G.
module tb_polar_pu;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  logic fsel, psum;
  llr_t llr_a, llr_b, llr_out;
  int checks = 0, failures = 0;
  polar_pu dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int a, b, e;
    for (int t = 0; t < 4000; t++) begin
      a = (t < 16) ? ((t & 1) ? 127 : -127) : int'($urandom_range(0, 254)) - 127;
      b = (t < 16) ? ((t & 2) ? 127 : -127) : int'($urandom_range(0, 254)) - 127;
      fsel = 1'(t >> 2); psum = 1'(t >> 3);
      llr_a = llr_t'(a); llr_b = llr_t'(b);
      #1;
      e = fsel ? gg(psum, a, b) : ff(a, b);
      checks++;
      if (int'(llr_out) != e) begin
        failures++;
        $display("FAIL fsel=%0d psum=%0d a=%0d b=%0d got %0d exp %0d", fsel, psum, a, b, llr_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
