// Result FIFO of one slave processor.
//
// A single-clock first-in first-out buffer: the slave side writes result
// bytes, the ISA side reads them. Reads and writes share one clock, as in
// the document's cycle-shared FIFO; both may happen in the same cycle. The
// output is show-ahead: rd_data always shows the oldest byte, and rd_en
// removes it. The document gives the size (128 bits, i.e. 16 bytes of 8
// bits); the show-ahead output, dropping writes when full, ignoring reads
// when empty and the synchronous reset of the pointers are this design's
// choices.
//
// Interface: wr_en/wr_data push, rd_en pops, full/empty/count report the
// fill level. All outputs change only on the rising clock edge.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A full FIFO never grows past DEPTH, an empty one never underflows.
  assert property (@(posedge clk) disable iff (rst) count <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
