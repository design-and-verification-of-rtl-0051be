// router_fifo: byte FIFO of one output port of the 1x3 router.
//
// Each output port has one of these. The input side writes a byte on a
// rising clock edge when wr_en is high and the FIFO is not full; the reader
// takes a byte on a rising edge when rd_en is high and the FIFO is not
// empty, and the byte appears on the registered d_out after that edge.
// Reads and writes may happen in the same cycle. full means every location
// holds a byte, empty means none does. While rstn is low, or for one cycle
// of soft_rst, the FIFO is emptied (full = 0, empty = 1, d_out = 0).
//
// Every word carries a ninth bit, set when lfd_state marks the byte as the
// header of a packet. When a header is read, its length field loads a
// count of the bytes still to come in that packet (payload + parity); once
// the count has run out and the reader stops, d_out returns to 0, so an
// idle port shows 0 rather than the last parity byte.
//
// Follows the router: the ports, the write and read rules, the reset
// values and the simultaneous read/write. This design's own choices: the
// depth of 16, the stored header flag and its use for the idle output,
// and soft_rst acting like a synchronous reset.
module router_fifo
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rstn,
  input  logic  soft_rst,
  input  logic  wr_en,
  input  logic  rd_en,
  input  logic  lfd_state,
  input  byte_t d_in,
  output logic  full,
  output logic  empty,
  output byte_t d_out
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic  first;   // header byte of a packet
    byte_t data;
  } word_t;

  word_t              mem [DEPTH];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;
  logic [PTR_W:0]     count;
  logic [LEN_W:0]     remaining;   // bytes of the current packet not yet read

  logic    do_wr, do_rd;
  logic [LEN_W-1:0] rd_len;  // length field, if the word at the read pointer is a header
  assign rd_len = mem[rd_ptr].data[DATA_W-1 -: LEN_W];
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign full  = (count == (PTR_W+1)'(DEPTH));
  assign empty = (count == '0);

  function automatic logic [PTR_W-1:0] bump(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= '{first: lfd_state, data: d_in};
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      remaining <= '0;
      d_out     <= '0;
    end else if (soft_rst) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      remaining <= '0;
      d_out     <= '0;
    end else begin
      if (do_wr) wr_ptr <= bump(wr_ptr);
      if (do_rd) rd_ptr <= bump(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (do_rd) begin
        d_out <= mem[rd_ptr].data;
        if (mem[rd_ptr].first)
          remaining <= {1'b0, rd_len} + 1'b1;
        else if (remaining != '0)
          remaining <= remaining - 1'b1;
      end else if (remaining == '0) begin
        d_out <= '0;
      end
    end
  end

endmodule
