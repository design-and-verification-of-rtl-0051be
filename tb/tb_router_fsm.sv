// tb_router_fsm: self-checking test of router_fsm.
//
// Random values on every input of the controller, held for random lengths,
// drive it through all of its states. A reference model in the testbench,
// written from the state table in the controller's description (which
// state follows which, under which condition), predicts the state, and the
// controller's eight outputs are compared with what that state must drive.
// Every state and every abandon on a soft reset must be seen at least once.
module tb_router_fsm;
  import router_pkg::*;

  logic clk = 1'b0;
  logic rstn, pkt_valid, fifo_full, parity_done, low_pkt_valid;
  logic [1:0] d_in;
  logic fifo_empty_0, fifo_empty_1, fifo_empty_2;
  logic soft_rst_0, soft_rst_1, soft_rst_2;
  logic wr_en_reg, detect_add, ld_state, laf_state, lfd_state;
  logic full_state, rst_int_reg, busy;

  int checks = 0, failures = 0;

  router_fsm dut (.*);

  always #5 clk = ~clk;

  // model state: 0 decode, 1 wait, 2 lfd, 3 ld, 4 full, 5 laf, 6 check, 7 drop
  int   m_st, m_addr;
  int   visits[8];
  int   n_abandon = 0;
  logic [2:0] emp, srst;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: model state %0d", what, $time, m_st);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nxt;
    logic [7:0] exp;
    rstn = 1'b0; pkt_valid = 1'b0; fifo_full = 1'b0; parity_done = 1'b0;
    low_pkt_valid = 1'b0; d_in = '0; emp = '1; srst = '0;
    {fifo_empty_2, fifo_empty_1, fifo_empty_0} = emp;
    {soft_rst_2, soft_rst_1, soft_rst_0} = srst;
    m_st = 0; m_addr = 0; visits = '{default: 0};
    repeat (2) @(posedge clk);
    #1 rstn = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      // change inputs with low probability so that waits end and loops run
      if ($urandom_range(0, 2) == 0) pkt_valid = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 2) == 0) d_in = 2'($urandom);
      if ($urandom_range(0, 3) == 0) fifo_full = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 3) == 0) emp = 3'($urandom);
      if ($urandom_range(0, 2) == 0) parity_done = 1'($urandom);
      if ($urandom_range(0, 2) == 0) low_pkt_valid = 1'($urandom);
      srst = ($urandom_range(0, 29) == 0) ? 3'($urandom) : 3'b000;
      {fifo_empty_2, fifo_empty_1, fifo_empty_0} = emp;
      {soft_rst_2, soft_rst_1, soft_rst_0} = srst;
      #1;
      // outputs of the model state: wr, detect, ld, laf, lfd, full, rst, busy
      case (m_st)
        0: exp = 8'b0100_0000;
        1: exp = 8'b0000_0001;
        2: exp = 8'b1000_1001;
        3: exp = 8'b1010_0000;
        4: exp = 8'b0000_0101;
        5: exp = 8'b1001_0001;
        6: exp = 8'b0000_0011;
        default: exp = 8'b0000_0000;
      endcase
      check("outputs", {wr_en_reg, detect_add, ld_state, laf_state, lfd_state,
                        full_state, rst_int_reg, busy} == exp);
      visits[m_st]++;
      nxt = m_st;
      case (m_st)
        0: if (pkt_valid && d_in != 2'd3) nxt = emp[d_in] ? 2 : 1;
        1: if (m_addr != 3 && emp[m_addr]) nxt = 2;
        2: nxt = 3;
        3: nxt = fifo_full ? 4 : (!pkt_valid ? 6 : 3);
        4: if (!fifo_full) nxt = 5;
        5: nxt = low_pkt_valid ? 6 : 3;
        6: if (parity_done) nxt = 0;
        default: if (!pkt_valid) nxt = 0;
      endcase
      if (m_st inside {3, 4, 5} && m_addr != 3 && srst[m_addr]) begin
        if (m_st == 3) nxt = pkt_valid ? 7 : 0;
        else           nxt = low_pkt_valid ? 0 : 7;
        n_abandon++;
      end
      @(posedge clk);
      if (m_st == 0 && pkt_valid) m_addr = int'(d_in);
      m_st = nxt;
      #1;
    end
    for (int s = 0; s < 8; s++) check($sformatf("state %0d visited", s), visits[s] > 0);
    check("abandon seen", n_abandon > 0);
    $display("visits: %p abandons: %0d", visits, n_abandon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
