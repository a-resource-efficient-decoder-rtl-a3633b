// data_rom: read-only store of the information words the verification
// platform sends through encoder and decoder, with two synchronous read
// ports (one for the encoder, one for the checker); data appears the cycle
// after the address. Word i holds a 32-bit xorshift sequence started from
// SEED: w(0) = SEED, w(i+1) = xs(w(i)) with xs(v) = v ^ v<<13, then ^ >>17,
// then ^ <<5. The two-port ROM follows the platform structure of the design;
// its size and contents are this implementation's choices.
module data_rom #(
  parameter int unsigned DEPTH = 64,
  parameter logic [31:0] SEED  = 32'h5ea0_d236
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  output logic [31:0]              data_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [31:0]              data_b
);
  function automatic logic [31:0] xs(input logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    return t ^ (t << 5);
  endfunction

  function automatic logic [DEPTH*32-1:0] fill();
    logic [DEPTH*32-1:0] r;
    logic [31:0]         w;
    w = SEED;
    for (int i = 0; i < DEPTH; i++) begin
      r[32*i +: 32] = w;
      w = xs(w);
    end
    return r;
  endfunction

  localparam logic [DEPTH*32-1:0] CONTENT = fill();

  always_ff @(posedge clk) begin
    data_a <= CONTENT[32*int'(addr_a) +: 32];
    data_b <= CONTENT[32*int'(addr_b) +: 32];
  end
endmodule
