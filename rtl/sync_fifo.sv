// sync_fifo: the class buffer, a single-clock FIFO held in a memory array.
//
// Words are written with wen/wdt and read with ren; the read word appears on
// rddt one clk cycle after ren, flagged by rvalid (block-RAM style read
// port). The fill count has CNT_W bits (12 in the document's block diagram),
// so the buffer holds at most 2**CNT_W - 1 words, with a 2**CNT_W-entry
// memory. A write into a full buffer is dropped and reported on overflow
// for that cycle; a read of an empty buffer is ignored. Reading and writing
// in the same cycle is allowed. Depth and word width follow the document's
// diagram; the drop-on-full policy is this design's choice.
module sync_fifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned CNT_W  = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wen,
  input  logic [DATA_W-1:0] wdt,
  input  logic              ren,
  output logic [DATA_W-1:0] rddt,
  output logic              rvalid,
  output logic [CNT_W-1:0]  count,
  output logic              empty,
  output logic              full,
  output logic              overflow
);
  localparam int unsigned DEPTH = 2 ** CNT_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [CNT_W-1:0]  wptr, rptr;
  logic              do_wr, do_rd;

  assign empty    = (count == '0);
  assign full     = (count == '1);
  assign do_rd    = ren && !empty;
  assign do_wr    = wen && !full;
  assign overflow = wen && full;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdt;
  end

  always_ff @(posedge clk) begin
    if (do_rd) rddt <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr   <= '0;
      rptr   <= '0;
      count  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= do_rd;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
