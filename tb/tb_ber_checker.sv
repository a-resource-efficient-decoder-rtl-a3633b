// tb_ber_checker: sends frames of words equal to a ROM model, with known bits
// flipped (some of them in the ignored padding of a frame's last word), and
// checks the bit error, word and frame counts, the framing error flag and
// done after FRAMES frames.
module tb_ber_checker;
  import polar_pkg::*;
  localparam int FR = 3, RD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, m_valid, m_ready, m_last, frame_err, done;
  logic [LOG_NMAX:0] k_info;
  logic [31:0] m_data, rom_data, bit_errors, words;
  logic [5:0] rom_addr;
  logic [15:0] frames;
  logic [31:0] rom [RD];
  int checks = 0, failures = 0;
  ber_checker #(.FRAMES(FR), .ROM_DEPTH(RD)) dut (.*);
  always_ff @(posedge clk) rom_data <= rom[rom_addr];
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask
  initial begin
    int exp_err, wi, nw, flip;
    for (int i = 0; i < RD; i++) rom[i] = $urandom;
    clear = 0; m_valid = 0; m_last = 0; m_data = '0;
    for (int pass = 0; pass < 2; pass++) begin
      k_info = (pass == 0) ? 11'd80 : 11'd64;       // 3 words (16 bits in the last) / 2 words
      nw = (pass == 0) ? 3 : 2;
      if (pass == 0) begin repeat (2) @(posedge clk); rst_n = 1; end
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      exp_err = 0; wi = 0;
      for (int f = 0; f < FR; f++)
        for (int w = 0; w < nw; w++) begin
          m_data = rom[wi % RD];
          flip = $urandom_range(0, 31);
          if ($urandom_range(0, 1)) begin
            m_data[flip] = ~m_data[flip];
            if (!(pass == 0 && w == nw - 1 && flip >= 16)) exp_err++;
          end
          m_valid = 1; m_last = (w == nw - 1);
          @(posedge clk);
          while (!m_ready) @(posedge clk);
          #1 m_valid = 0;
          wi++;
          @(negedge clk);
        end
      repeat (3) @(posedge clk);
      chk(int'(bit_errors), exp_err, "bit errors");
      chk(int'(words), FR * nw, "words");
      chk(int'(frames), FR, "frames");
      chk(int'(done), 1, "done");
      chk(int'(frame_err), 0, "frame_err");
    end
    // a tlast on the wrong word must raise the framing error
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    m_data = rom[0]; m_valid = 1; m_last = 1;
    @(posedge clk);
    while (!m_ready) @(posedge clk);
    #1 m_valid = 0;
    @(posedge clk);
    chk(int'(frame_err), 1, "frame_err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
