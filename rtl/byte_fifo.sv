// byte_fifo: 64-byte FIFO between the random-byte generator and the USB side.
//
// A single-clock circular buffer of DEPTH entries of WIDTH bits with
// first-word fall-through: rd_data always shows the oldest byte while empty
// is low, and rd_en removes it. A write and a read may happen on the same
// clock. A write while full is dropped and reported by a one-clock overflow
// pulse; the generator is never stalled, so the reader simply sees fewer
// bytes. The 64-byte depth follows the source design; the single clock,
// fall-through read and drop-on-full policy are this design's own.
//
// Interface: clk, rst_n (synchronous, active low), wr_en/wr_data,
// rd_en -> rd_data, empty, full, count, overflow.
`timescale 1ps/1ps
module byte_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      overflow <= wr_en && full;
    end
  end

  assign rd_data = mem[rd_ptr];
  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));

  // Reading an empty FIFO is ignored, but a well-behaved reader never does it.
  property p_count_bound;
    @(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH)+1)'(DEPTH);
  endproperty
  assert property (p_count_bound) else $error("byte_fifo: count above DEPTH");
endmodule
