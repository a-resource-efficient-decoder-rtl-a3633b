// tb_line_decoder: drives all 64 lanes with random LLR pairs and partial sums
// for both functions and several active-lane counts; active lanes must match
// the integer F/G reference, inactive lanes must be zero.
module tb_line_decoder;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  localparam int P = 64;
  logic fsel;
  logic [$clog2(P+1)-1:0] n_active;
  llr_t llr_a [P];
  llr_t llr_b [P];
  logic [P-1:0] psum;
  llr_t llr_out [P];
  int checks = 0, failures = 0;
  line_decoder #(.P(P)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int e;
    int na [4] = '{64, 32, 16, 8};
    for (int t = 0; t < 64; t++) begin
      fsel = 1'(t);
      n_active = 7'(na[t % 4]);
      psum = {$urandom, $urandom};
      for (int k = 0; k < P; k++) begin
        llr_a[k] = llr_t'(int'($urandom_range(0, 254)) - 127);
        llr_b[k] = llr_t'(int'($urandom_range(0, 254)) - 127);
      end
      #1;
      for (int k = 0; k < P; k++) begin
        e = (k >= na[t % 4]) ? 0 : fsel ? gg(psum[k], llr_a[k], llr_b[k]) : ff(llr_a[k], llr_b[k]);
        checks++;
        if (int'(llr_out[k]) != e) begin failures++; $display("FAIL lane %0d got %0d exp %0d", k, llr_out[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
