// router_reg: data and status registers of the 1x3 router.
//
// Four registers, all clocked on the rising edge:
//   header_q     the header byte, caught while the controller decodes
//   full_byte_q  the input byte that arrived when the FIFO was full
//   int_parity_q XOR of the header and every payload byte written so far
//   pkt_parity_q the parity byte that came with the packet
// plus the flags low_pkt_valid (the parity byte has arrived), parity_done
// (the parity byte has been written into the FIFO) and err.
//
// d_out is the byte the FIFO writes and is chosen combinationally: the
// header in lfd_state, the kept byte in laf_state and the input byte
// otherwise, so a byte is written in the same clock its state is active.
// err is set in the clock after the controller's parity check (rst_int_reg)
// when the two parities differ, and holds until the next header is taken.
// low_pkt_valid is cleared by rst_int_reg; parity_done, err and
// low_pkt_valid are all cleared when a new header is taken.
//
// Follows the router: the four registers, the ports and the error output.
// The XOR parity rule, d_out being a multiplexer rather than a fifth
// register, and the set and clear timing of the flags are this design's.
module router_reg
  import router_pkg::*;
(
  input  logic  clk,
  input  logic  rstn,
  input  logic  pkt_valid,
  input  byte_t d_in,
  input  logic  fifo_full,
  input  logic  detect_add,
  input  logic  ld_state,
  input  logic  laf_state,
  input  logic  full_state,
  input  logic  lfd_state,
  input  logic  rst_int_reg,
  output logic  err,
  output logic  parity_done,
  output logic  low_pkt_valid,
  output byte_t d_out
);

  byte_t header_q, full_byte_q, int_parity_q, pkt_parity_q;
  logic  new_pkt;

  assign new_pkt = detect_add && pkt_valid && addr_valid(d_in[ADDR_W-1:0]);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      header_q      <= '0;
      full_byte_q   <= '0;
      int_parity_q  <= '0;
      pkt_parity_q  <= '0;
      low_pkt_valid <= 1'b0;
      parity_done   <= 1'b0;
      err           <= 1'b0;
    end else begin
      if (new_pkt) header_q <= d_in;

      if (ld_state && fifo_full) full_byte_q <= d_in;

      if (lfd_state)
        int_parity_q <= header_q;
      else if (ld_state && !fifo_full && pkt_valid)
        int_parity_q <= int_parity_q ^ d_in;
      else if (laf_state && !low_pkt_valid)
        int_parity_q <= int_parity_q ^ full_byte_q;

      if (ld_state && !pkt_valid) pkt_parity_q <= d_in;

      if (new_pkt || rst_int_reg)     low_pkt_valid <= 1'b0;
      else if (ld_state && !pkt_valid) low_pkt_valid <= 1'b1;

      if (new_pkt)
        parity_done <= 1'b0;
      else if ((ld_state && !pkt_valid && !fifo_full) || (laf_state && low_pkt_valid))
        parity_done <= 1'b1;

      if (new_pkt)
        err <= 1'b0;
      else if (rst_int_reg && parity_done)
        err <= (int_parity_q != pkt_parity_q);
    end
  end

  always_comb begin
    if (lfd_state)      d_out = header_q;
    else if (laf_state) d_out = full_byte_q;
    else                d_out = d_in;
  end

  // The kept byte must not change while the controller waits for room.
  a_full_hold: assert property (@(posedge clk) disable iff (!rstn)
    full_state |=> $stable(full_byte_q));

endmodule
