// router_fsm: controller of the 1x3 router.
//
// A Moore machine that takes one packet at a time from the input port and
// drives the control signals of the register block and the synchronizer:
//
//   DECODE_ADDRESS     detect_add. A byte with pkt_valid high and an address
//                      of 0..2 is a header. If its FIFO is empty the packet
//                      starts at once, otherwise the machine waits.
//   WAIT_TILL_EMPTY    busy. Waits until the destination FIFO is empty, so
//                      packets of one port never share a FIFO.
//   LOAD_FIRST_DATA    lfd_state, write. The header goes into the FIFO.
//   LOAD_DATA          ld_state, write, not busy: one input byte per clock.
//                      The byte that comes with pkt_valid low is the parity
//                      byte and ends the packet. If the FIFO is full, the
//                      byte is kept by the register block instead.
//   FIFO_FULL_STATE    full_state, busy. Waits until the FIFO has room.
//   LOAD_AFTER_FULL    laf_state, write, busy. Writes the kept byte; goes on
//                      to the parity check if that byte was the parity.
//   CHECK_PARITY_ERROR rst_int_reg, busy. The register block compares the
//                      parities; waits for parity_done, then back to decode.
//   DROP_PACKET        not busy. The destination FIFO was soft-reset while
//                      the packet was being written (LD, FULL or LAF): the
//                      rest of the packet is taken and thrown away, up to
//                      and including the byte with pkt_valid low.
//
// busy tells the source to hold its byte: a byte is taken in every clock
// in which busy is low, that is in DECODE_ADDRESS (when pkt_valid is high),
// LOAD_DATA and DROP_PACKET.
//
// Follows the router: the ports, the control outputs and what each is for.
// The transitions, the busy rule and DROP_PACKET are this design's own.
module router_fsm
  import router_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  input  logic              pkt_valid,
  input  logic [ADDR_W-1:0] d_in,
  input  logic              fifo_full,
  input  logic              fifo_empty_0, fifo_empty_1, fifo_empty_2,
  input  logic              soft_rst_0, soft_rst_1, soft_rst_2,
  input  logic              parity_done,
  input  logic              low_pkt_valid,
  output logic              wr_en_reg,
  output logic              detect_add,
  output logic              ld_state,
  output logic              laf_state,
  output logic              lfd_state,
  output logic              full_state,
  output logic              rst_int_reg,
  output logic              busy
);

  fsm_state_t state, next;
  logic [ADDR_W-1:0]    addr_q;
  logic [NUM_PORTS-1:0] empty_v, srst_v;

  assign empty_v = {fifo_empty_2, fifo_empty_1, fifo_empty_0};
  assign srst_v  = {soft_rst_2, soft_rst_1, soft_rst_0};

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)                                   addr_q <= '0;
    else if (state == DECODE_ADDRESS && pkt_valid) addr_q <= d_in;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) state <= DECODE_ADDRESS;
    else       state <= next;
  end

  // Port 3 does not exist, so indexing is guarded by addr_valid.
  logic abandon;
  assign abandon = addr_valid(addr_q) && srst_v[addr_q];

  always_comb begin
    next = state;
    unique case (state)
      DECODE_ADDRESS:
        if (pkt_valid && addr_valid(d_in))
          next = empty_v[d_in] ? LOAD_FIRST_DATA : WAIT_TILL_EMPTY;
      WAIT_TILL_EMPTY:
        if (addr_valid(addr_q) && empty_v[addr_q]) next = LOAD_FIRST_DATA;
      LOAD_FIRST_DATA:
        next = LOAD_DATA;
      LOAD_DATA:
        if (fifo_full)       next = FIFO_FULL_STATE;
        else if (!pkt_valid) next = CHECK_PARITY_ERROR;
      FIFO_FULL_STATE:
        if (!fifo_full) next = LOAD_AFTER_FULL;
      LOAD_AFTER_FULL:
        next = low_pkt_valid ? CHECK_PARITY_ERROR : LOAD_DATA;
      CHECK_PARITY_ERROR:
        if (parity_done) next = DECODE_ADDRESS;
      DROP_PACKET:
        if (!pkt_valid) next = DECODE_ADDRESS;
      default:
        next = DECODE_ADDRESS;
    endcase
    // A soft reset of the destination ends the packet. Bytes the source has
    // not yet given are taken and discarded, up to the parity byte.
    if (abandon) begin
      if (state == LOAD_DATA)
        next = pkt_valid ? DROP_PACKET : DECODE_ADDRESS;
      else if (state inside {FIFO_FULL_STATE, LOAD_AFTER_FULL})
        next = low_pkt_valid ? DECODE_ADDRESS : DROP_PACKET;
    end
  end

  assign detect_add  = (state == DECODE_ADDRESS);
  assign lfd_state   = (state == LOAD_FIRST_DATA);
  assign ld_state    = (state == LOAD_DATA);
  assign full_state  = (state == FIFO_FULL_STATE);
  assign laf_state   = (state == LOAD_AFTER_FULL);
  assign rst_int_reg = (state == CHECK_PARITY_ERROR);
  assign wr_en_reg   = lfd_state || ld_state || laf_state;
  assign busy        = !(detect_add || ld_state || state == DROP_PACKET);

  // Exactly one state output is active, and a header write is always
  // followed by the first payload byte.
  a_one_state: assert property (@(posedge clk) disable iff (!rstn)
    $onehot({detect_add, lfd_state, ld_state, full_state, laf_state, rst_int_reg,
             state == WAIT_TILL_EMPTY, state == DROP_PACKET}));
  a_lfd_then_ld: assert property (@(posedge clk) disable iff (!rstn)
    lfd_state |=> ld_state);

endmodule
