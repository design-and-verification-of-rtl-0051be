// tb_router_fifo: self-checking test of router_fifo.
//
// Drives random writes and reads (including simultaneous ones and attempts
// on a full or empty FIFO), packets whose first byte is marked as a header,
// soft resets and a reset, and compares full, empty and d_out every clock
// with a queue model kept in the testbench. The model also follows the
// header length so that the idle value of d_out (0 once a packet has been
// read out and the reader stops) is checked.
module tb_router_fifo;
  import router_pkg::*;

  localparam int unsigned DEPTH = 16;   // the FIFO's default depth

  logic  clk = 1'b0;
  logic  rstn, soft_rst, wr_en, rd_en, lfd_state;
  byte_t d_in, d_out;
  logic  full, empty;

  int checks = 0, failures = 0;

  router_fifo dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic [8:0] q[$];
  byte_t      m_dout;
  int         m_rem;
  int         n_full_seen = 0, n_empty_rd = 0, n_both = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: full=%0b empty=%0b d_out=%02h model n=%0d d_out=%02h",
               what, $time, full, empty, d_out, q.size(), m_dout);
    end
  endtask

  // packet byte source for writes: header with random length, then bytes
  int    wr_left = 0;
  logic  next_first;
  byte_t next_byte;
  task automatic pick_byte();
    if (wr_left == 0) begin
      next_byte  = {6'($urandom_range(1, 6)), 2'($urandom_range(0, 2))};
      next_first = 1'b1;
    end else begin
      next_byte  = byte_t'($urandom);
      next_first = 1'b0;
    end
  endtask

  task automatic step(input logic w, input logic r, input logic s);
    logic do_w, do_r;
    pick_byte();
    wr_en = w; rd_en = r; soft_rst = s;
    d_in = next_byte; lfd_state = next_first;
    #1;
    check("flags", full == (q.size() == DEPTH) && empty == (q.size() == 0));
    do_w = w && (q.size() < DEPTH);
    do_r = r && (q.size() > 0);
    if (w && q.size() == DEPTH) n_full_seen++;
    if (r && q.size() == 0) n_empty_rd++;
    if (do_w && do_r) n_both++;
    @(posedge clk);
    if (s) begin
      q.delete(); m_dout = '0; m_rem = 0; wr_left = 0;
    end else begin
      if (do_r) begin
        logic [8:0] wd;
        wd = q.pop_front();
        m_dout = wd[7:0];
        if (wd[8]) m_rem = int'(wd[7:2]) + 1;
        else if (m_rem > 0) m_rem--;
      end else if (m_rem == 0) m_dout = '0;
      if (do_w) begin
        q.push_back({next_first, next_byte});
        wr_left = next_first ? int'(next_byte[7:2]) + 1 : wr_left - 1;
      end
    end
    #1;
    check("data", d_out == m_dout);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstn = 1'b0; soft_rst = 1'b0; wr_en = 1'b0; rd_en = 1'b0;
    lfd_state = 1'b0; d_in = '0;
    m_dout = '0; m_rem = 0;
    repeat (2) @(posedge clk);
    #1;
    check("reset values", !full && empty && d_out == '0);
    rstn = 1'b1;
    // fill past full, then drain past empty
    repeat (DEPTH + 3) step(1'b1, 1'b0, 1'b0);
    repeat (DEPTH + 3) step(1'b0, 1'b1, 1'b0);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      automatic int unsigned mode = (i / 300) % 3;  // write-heavy, balanced, read-heavy
      automatic logic w, r;
      w = ($urandom_range(0, 9) < (mode == 0 ? 8 : mode == 1 ? 5 : 3));
      r = ($urandom_range(0, 9) < (mode == 0 ? 3 : mode == 1 ? 5 : 8));
      step(w, r, ($urandom_range(0, 499) == 0));
    end
    // soft reset with data inside
    repeat (5) step(1'b1, 1'b0, 1'b0);
    step(1'b0, 1'b0, 1'b1);
    check("soft reset empties", empty && !full && d_out == '0);
    // asynchronous reset with data inside
    repeat (5) step(1'b1, 1'b0, 1'b0);
    rstn = 1'b0; #1;
    check("async reset", empty && !full && d_out == '0);
    q.delete(); m_dout = '0; m_rem = 0; wr_left = 0;
    @(posedge clk); #1 rstn = 1'b1;
    check("saw full, empty read and simultaneous access",
          n_full_seen > 0 && n_empty_rd > 0 && n_both > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
