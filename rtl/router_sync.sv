// router_sync: synchronizer between the controller and the three FIFOs.
//
// While the controller is decoding a header (detect_add high) the two
// address bits of the input byte are latched; the latched address then
// holds for the whole packet and steers the controller's single write
// enable (wr_en_reg) to one FIFO (wr_en, one-hot) and selects that FIFO's
// full flag as fifo_full. Address 3 selects no FIFO. vld_out_N is high
// whenever FIFO N holds data. If a port shows vld_out_N but its reader
// does not assert rd_en_N for TIMEOUT consecutive clocks, soft_rst_N is
// pulsed for one clock to empty that FIFO, and the count restarts.
//
// wr_en, fifo_full and vld_out are combinational from the latched address
// and the FIFO flags; soft_rst is registered.
//
// Follows the router: the ports and the job of holding the FIFO choice for
// a packet. This design's own choices: latching on detect_add alone, the
// time-out rule behind soft_rst and its length of 30 clocks.
module router_sync
  import router_pkg::*;
#(
  parameter int unsigned TIMEOUT = 30
) (
  input  logic                  clk,
  input  logic                  rstn,
  input  logic                  detect_add,
  input  logic [ADDR_W-1:0]     d_in,
  input  logic                  wr_en_reg,
  input  logic                  full_0, full_1, full_2,
  input  logic                  empty_0, empty_1, empty_2,
  input  logic                  rd_en_0, rd_en_1, rd_en_2,
  output logic [NUM_PORTS-1:0]  wr_en,
  output logic                  fifo_full,
  output logic                  vld_out_0, vld_out_1, vld_out_2,
  output logic                  soft_rst_0, soft_rst_1, soft_rst_2
);

  localparam int unsigned CNT_W = $clog2(TIMEOUT + 1);

  logic [ADDR_W-1:0]    addr_q;
  logic [NUM_PORTS-1:0] full_v, empty_v, rd_v, vld_v, srst_v;

  assign full_v  = {full_2, full_1, full_0};
  assign empty_v = {empty_2, empty_1, empty_0};
  assign rd_v    = {rd_en_2, rd_en_1, rd_en_0};

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)           addr_q <= '0;
    else if (detect_add) addr_q <= d_in;
  end

  always_comb begin
    wr_en     = '0;
    fifo_full = 1'b0;
    if (addr_valid(addr_q)) begin
      wr_en[addr_q] = wr_en_reg;
      fifo_full     = full_v[addr_q];
    end
  end

  assign vld_v = ~empty_v;
  assign {vld_out_2, vld_out_1, vld_out_0} = vld_v;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_timer
    logic [CNT_W-1:0] idle_cnt;
    always_ff @(posedge clk or negedge rstn) begin
      if (!rstn) begin
        idle_cnt  <= '0;
        srst_v[p] <= 1'b0;
      end else if (vld_v[p] && !rd_v[p] && !srst_v[p]) begin
        if (idle_cnt == CNT_W'(TIMEOUT - 1)) begin
          idle_cnt  <= '0;
          srst_v[p] <= 1'b1;
        end else begin
          idle_cnt  <= idle_cnt + 1'b1;
          srst_v[p] <= 1'b0;
        end
      end else begin
        idle_cnt  <= '0;
        srst_v[p] <= 1'b0;
      end
    end
  end

  assign {soft_rst_2, soft_rst_1, soft_rst_0} = srst_v;

endmodule
