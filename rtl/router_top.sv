// router_top: 1x3 packet router.
//
// Packets arrive one byte per clock on data_in, framed by pkt_valid, and
// leave on one of three output ports chosen by the two low bits of the
// header. The design is six blocks: the controller (router_fsm), the
// register block (router_reg), the synchronizer (router_sync) and one
// FIFO per output port (router_fifo).
//
// Input side: pkt_valid is high from the header through the last payload
// byte and low with the parity byte. A byte is taken in a clock in which
// busy is low; while busy is high the source holds data_in and pkt_valid.
// Output side: vld_out_N is high while FIFO N holds data; the reader raises
// read_enb_N and gets the next byte on data_out_N after the clock edge. A
// reader that leaves vld_out_N unanswered for SYNC_TIMEOUT clocks has its
// FIFO emptied. err rises after a packet whose parity byte does not match
// the XOR of its header and payload, and stays up until the next header.
//
// The block split, the port names and the packet format are the router's;
// the FIFO depth, the time-out, the parity rule and the handshake timing
// are choices of this design (see each block).
module router_top
  import router_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned SYNC_TIMEOUT = 30
) (
  input  logic  clock,
  input  logic  resetn,
  input  logic  pkt_valid,
  input  byte_t data_in,
  input  logic  read_enb_0,
  input  logic  read_enb_1,
  input  logic  read_enb_2,
  output byte_t data_out_0,
  output byte_t data_out_1,
  output byte_t data_out_2,
  output logic  vld_out_0,
  output logic  vld_out_1,
  output logic  vld_out_2,
  output logic  err,
  output logic  busy
);

  logic                 wr_en_reg, detect_add, ld_state, laf_state;
  logic                 lfd_state, full_state, rst_int_reg;
  logic                 parity_done, low_pkt_valid, fifo_full;
  logic [NUM_PORTS-1:0] wr_en, full, empty, soft_rst, rd_en;
  byte_t                dout;
  byte_t                data_out [NUM_PORTS];

  assign rd_en = {read_enb_2, read_enb_1, read_enb_0};

  router_fsm u_fsm (
    .clk          (clock),
    .rstn         (resetn),
    .pkt_valid    (pkt_valid),
    .d_in         (data_in[ADDR_W-1:0]),
    .fifo_full    (fifo_full),
    .fifo_empty_0 (empty[0]),
    .fifo_empty_1 (empty[1]),
    .fifo_empty_2 (empty[2]),
    .soft_rst_0   (soft_rst[0]),
    .soft_rst_1   (soft_rst[1]),
    .soft_rst_2   (soft_rst[2]),
    .parity_done  (parity_done),
    .low_pkt_valid(low_pkt_valid),
    .wr_en_reg    (wr_en_reg),
    .detect_add   (detect_add),
    .ld_state     (ld_state),
    .laf_state    (laf_state),
    .lfd_state    (lfd_state),
    .full_state   (full_state),
    .rst_int_reg  (rst_int_reg),
    .busy         (busy)
  );

  router_reg u_reg (
    .clk          (clock),
    .rstn         (resetn),
    .pkt_valid    (pkt_valid),
    .d_in         (data_in),
    .fifo_full    (fifo_full),
    .detect_add   (detect_add),
    .ld_state     (ld_state),
    .laf_state    (laf_state),
    .full_state   (full_state),
    .lfd_state    (lfd_state),
    .rst_int_reg  (rst_int_reg),
    .err          (err),
    .parity_done  (parity_done),
    .low_pkt_valid(low_pkt_valid),
    .d_out        (dout)
  );

  router_sync #(.TIMEOUT(SYNC_TIMEOUT)) u_sync (
    .clk        (clock),
    .rstn       (resetn),
    .detect_add (detect_add),
    .d_in       (data_in[ADDR_W-1:0]),
    .wr_en_reg  (wr_en_reg),
    .full_0     (full[0]),
    .full_1     (full[1]),
    .full_2     (full[2]),
    .empty_0    (empty[0]),
    .empty_1    (empty[1]),
    .empty_2    (empty[2]),
    .rd_en_0    (rd_en[0]),
    .rd_en_1    (rd_en[1]),
    .rd_en_2    (rd_en[2]),
    .wr_en      (wr_en),
    .fifo_full  (fifo_full),
    .vld_out_0  (vld_out_0),
    .vld_out_1  (vld_out_1),
    .vld_out_2  (vld_out_2),
    .soft_rst_0 (soft_rst[0]),
    .soft_rst_1 (soft_rst[1]),
    .soft_rst_2 (soft_rst[2])
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_fifo
    router_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clock),
      .rstn     (resetn),
      .soft_rst (soft_rst[p]),
      .wr_en    (wr_en[p]),
      .rd_en    (rd_en[p]),
      .lfd_state(lfd_state),
      .d_in     (dout),
      .full     (full[p]),
      .empty    (empty[p]),
      .d_out    (data_out[p])
    );
  end

  assign data_out_0 = data_out[0];
  assign data_out_1 = data_out[1];
  assign data_out_2 = data_out[2];

endmodule
