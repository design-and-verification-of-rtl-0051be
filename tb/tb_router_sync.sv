// tb_router_sync: self-checking test of router_sync.
//
// Random address bits, detect_add, write enables, FIFO flags and read
// enables are applied every clock. A model in the testbench latches the
// address on detect_add, works out the one-hot write enable, the selected
// full flag and vld_out, and counts idle clocks per port to predict the
// exact clock of every soft reset (after 30 clocks of vld_out without a
// read). Long idle stretches are forced so that every port times out.
module tb_router_sync;
  import router_pkg::*;

  localparam int unsigned TIMEOUT = 30;   // the default time-out

  logic clk = 1'b0;
  logic rstn, detect_add, wr_en_reg;
  logic [1:0] d_in;
  logic full_0, full_1, full_2, empty_0, empty_1, empty_2;
  logic rd_en_0, rd_en_1, rd_en_2;
  logic [2:0] wr_en;
  logic fifo_full, vld_out_0, vld_out_1, vld_out_2;
  logic soft_rst_0, soft_rst_1, soft_rst_2;

  int checks = 0, failures = 0;
  int n_srst[3] = '{0, 0, 0};

  router_sync dut (.*);

  always #5 clk = ~clk;

  logic [1:0] m_addr;
  int         m_idle[3];
  logic [2:0] m_srst;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] full_v, empty_v, rd_v, exp_wr;
    logic exp_full;
    rstn = 1'b0; detect_add = 1'b0; wr_en_reg = 1'b0; d_in = '0;
    {full_2, full_1, full_0} = '0; {empty_2, empty_1, empty_0} = '1;
    {rd_en_2, rd_en_1, rd_en_0} = '0;
    m_addr = '0; m_idle = '{0, 0, 0}; m_srst = '0;
    repeat (2) @(posedge clk);
    #1 rstn = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      // first 300 clocks: busy readers; then one port idle at a time
      automatic int idle_port = (i < 300) ? -1 : (i / 250) % 3;
      #1;
      full_v  = 3'($urandom);
      empty_v = 3'($urandom) & 3'($urandom);
      rd_v    = 3'($urandom);
      if (idle_port >= 0) begin
        empty_v[idle_port] = 1'b0;
        rd_v[idle_port]    = ($urandom_range(0, 199) == 0);
      end
      detect_add = ($urandom_range(0, 3) == 0);
      d_in       = 2'($urandom);
      wr_en_reg  = 1'($urandom);
      {full_2, full_1, full_0}    = full_v;
      {empty_2, empty_1, empty_0} = empty_v;
      {rd_en_2, rd_en_1, rd_en_0} = rd_v;
      #1;
      exp_wr = '0; exp_full = 1'b0;
      if (m_addr != 2'd3) begin
        exp_wr[m_addr] = wr_en_reg;
        exp_full       = full_v[m_addr];
      end
      check("wr_en", wr_en == exp_wr);
      check("fifo_full", fifo_full == exp_full);
      check("vld_out", {vld_out_2, vld_out_1, vld_out_0} == ~empty_v);
      check("soft_rst", {soft_rst_2, soft_rst_1, soft_rst_0} == m_srst);
      @(posedge clk);
      if (detect_add) m_addr = d_in;
      for (int p = 0; p < 3; p++) begin
        if (!empty_v[p] && !rd_v[p] && !m_srst[p]) begin
          if (m_idle[p] == TIMEOUT - 1) begin
            m_idle[p] = 0; m_srst[p] = 1'b1; n_srst[p]++;
          end else begin
            m_idle[p]++; m_srst[p] = 1'b0;
          end
        end else begin
          m_idle[p] = 0; m_srst[p] = 1'b0;
        end
      end
    end
    check("every port timed out", n_srst[0] > 0 && n_srst[1] > 0 && n_srst[2] > 0);
    $display("soft resets: %0d %0d %0d", n_srst[0], n_srst[1], n_srst[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
