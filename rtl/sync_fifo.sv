// sync_fifo: single-clock FIFO with valid/ready on both sides.
//
// DEPTH entries of WIDTH bits in a circular buffer with read and write
// pointers and an occupancy count. in_ready is high while not full, out_valid
// while not empty; data written in one cycle can be read from the next. Reads
// are from the register array (first-word fall-through). Used both as the
// input FIFO of the encapsulated decoder and as the encoder FIFO of the
// verification platform. The depth and the fall-through behaviour are this
// implementation's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 65,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign in_ready  = (32'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = buf_q[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wp] <= in_data;
  end
endmodule
