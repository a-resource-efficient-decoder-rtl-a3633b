// llr_trans: converts hard code bits into channel LLRs for the decoder.
//
// Each beat of 8 code bits becomes one 64-bit beat of 8 LLRs: bit 0 maps to
// +MAG and bit 1 to -MAG (LLR = log P(0)/P(1)), LLR k in bits [8k +: 8].
// One register stage with valid/ready; it accepts a new beat whenever its
// output register is empty or being emptied. tlast passes through.
// The conversion from hard bits to LLRs follows the platform of the design;
// the magnitude MAG and the beat format are this implementation's choices.
module llr_trans
  import polar_pkg::*;
#(
  parameter int unsigned MAG = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_valid,
  output logic        h_ready,
  input  logic [7:0]  h_bits,
  input  logic        h_last,
  output logic        l_valid,
  input  logic        l_ready,
  output logic [63:0] l_data,
  output logic        l_last
);
  logic [63:0] conv;
  always_comb
    for (int k = 0; k < 8; k++)
      conv[8*k +: 8] = h_bits[k] ? -8'(MAG) : 8'(MAG);

  assign h_ready = !l_valid || l_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_valid <= 1'b0;
      l_data  <= '0;
      l_last  <= 1'b0;
    end else if (h_ready) begin
      l_valid <= h_valid;
      if (h_valid) begin
        l_data <= conv;
        l_last <= h_last;
      end
    end
  end
endmodule
