// tb_router_top: end-to-end test of the 1x3 router at its default sizes.
//
// A source sends packets of 1 to 63 payload bytes to random ports, holding
// each byte while busy is high; a quarter of them carry a wrong parity
// byte. Three readers take bytes whenever vld_out is high, with random
// pauses of up to 10 clocks, and compare every byte with the packets sent
// to their port; after the last byte of a packet, a reader that pauses
// must see 0 on its port. err is checked when the next header is taken.
// Two directed phases follow: a reader that never answers (its FIFO must
// be emptied by the time-out), and a long packet to a port whose reader
// never answers (the FIFO fills, is emptied by the time-out, and the
// router takes and discards the rest of the packet).
// Each mechanism (waiting for an empty FIFO, a full FIFO, the load after
// full, a wrong parity, the time-out and the dropped packet) is counted
// from the controller's states and must occur at least once. For packets
// that neither wait nor meet a full FIFO the clocks from header to parity byte are
// checked against the length (payload + 2).
module tb_router_top;
  import router_pkg::*;

  logic  clock = 1'b0;
  logic  resetn, pkt_valid, busy, err;
  byte_t data_in;
  logic  read_enb_0, read_enb_1, read_enb_2;
  logic  vld_out_0, vld_out_1, vld_out_2;
  byte_t data_out_0, data_out_1, data_out_2;

  localparam int TIMEOUT = 30;   // the router's default time-out

  localparam int MAX_PAYLOAD = 63;  // longest payload a header can give

  int checks = 0, failures = 0;

  router_top dut (.*);

  always #5 clock = ~clock;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- readers
  logic [8:0] expq[3][$];    // {last byte of packet, byte}
  logic       rd_on[3];
  int         n_read[3];
  logic [2:0] rd, vld;
  byte_t      dout[3];

  assign vld  = {vld_out_2, vld_out_1, vld_out_0};
  assign dout = '{data_out_0, data_out_1, data_out_2};
  assign {read_enb_2, read_enb_1, read_enb_0} = rd;

  for (genvar p = 0; p < 3; p++) begin : g_rd
    int   pause;
    logic after_last;
    initial begin
      rd[p] = 1'b0; pause = 0; after_last = 1'b0; n_read[p] = 0;
      forever begin
        logic took;
        @(posedge clock);
        took = rd[p] && vld[p];
        #1;
        if (took) begin
          n_read[p]++;
          if (expq[p].size() == 0) begin
            check($sformatf("port %0d: byte not sent", p), 1'b0);
          end else begin
            automatic logic [8:0] e = expq[p].pop_front();
            check($sformatf("port %0d data", p), dout[p] == e[7:0]);
            after_last = e[8];
          end
        end else if (after_last) begin
          check($sformatf("port %0d idle output", p), dout[p] == '0);
        end
        if (rd_on[p] && vld[p] && (pause >= 10 || $urandom_range(0, 1) == 0)) begin
          rd[p] = 1'b1; pause = 0;
        end else begin
          rd[p] = 1'b0;
          if (vld[p]) pause++;
        end
      end
    end
  end

  // --------------------------------------------------------- mechanism counts
  int n_wait = 0, n_full = 0, n_laf = 0, n_srst = 0, n_drop = 0, n_err = 0;
  int n_bad = 0, n_pkts = 0, n_timed = 0;
  int cyc = 0;

  always @(posedge clock) cyc <= cyc + 1;

  always @(posedge clock) if (resetn) begin
    if (dut.u_fsm.state == WAIT_TILL_EMPTY && $past(dut.u_fsm.state) != WAIT_TILL_EMPTY) n_wait++;
    if (dut.u_fsm.state == FIFO_FULL_STATE && $past(dut.u_fsm.state) != FIFO_FULL_STATE) n_full++;
    if (dut.u_fsm.state == LOAD_AFTER_FULL) n_laf++;
    n_srst += $countones(dut.soft_rst);
  end

  // ----------------------------------------------------------------- source
  logic prev_bad = 1'b0;

  // dropped tells whether the router threw the rest of the packet away
  task automatic send_packet(input int len, input int addr, input logic corrupt,
                             output logic dropped);
    byte_t b[$];
    byte_t par;
    int    t_hdr, t_par, full0, wait0;
    header_t h;
    h.length = 6'(len); h.addr = 2'(addr);
    b.push_back(byte_t'(h));
    par = byte_t'(h);
    for (int k = 0; k < len; k++) begin
      b.push_back(byte_t'($urandom));
      par ^= b[k+1];
    end
    if (corrupt) par ^= byte_t'($urandom_range(1, 255));
    b.push_back(par);
    for (int k = 0; k < b.size(); k++)
      expq[addr].push_back({(k == b.size() - 1), b[k]});
    dropped = 1'b0;
    full0 = n_full; wait0 = n_wait;
    for (int k = 0; k < b.size(); ) begin
      logic taken;
      data_in = b[k];
      pkt_valid = (k < b.size() - 1);
      #1;
      if (k == 0 && !busy) begin
        check("err after previous packet", err == prev_bad);
        if (err) n_err++;
      end
      taken = !busy;                 // busy is settled by now
      @(posedge clock);
      #1;
      if (taken) begin
        if (k == 0) t_hdr = cyc;
        if (k == b.size() - 1) t_par = cyc;
        k++;
      end
      if (dut.u_fsm.state == DROP_PACKET && !dropped) begin
        dropped = 1'b1;
        n_drop++;
      end
    end
    pkt_valid = 1'b0;
    data_in = byte_t'($urandom);
    // without a wait or a full FIFO, header to parity takes one clock per byte plus
    // the clock in which the header is written
    if (!dropped && n_full == full0 && n_wait == wait0) begin
      check("header-to-parity clocks", t_par - t_hdr == len + 2);
      n_timed++;
    end
    n_pkts++;
    if (corrupt) n_bad++;
    prev_bad = dropped ? 1'b0 : corrupt;   // a dropped packet never reaches the check
  endtask

  task automatic wait_idle(input int extra);
    while (dut.u_fsm.state != DECODE_ADDRESS) @(posedge clock);
    repeat (extra) @(posedge clock);
    #1;
  endtask

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic dropped;
    int n_before;
    resetn = 1'b0; pkt_valid = 1'b0; data_in = '0;
    rd_on = '{1'b1, 1'b1, 1'b1};
    repeat (3) @(posedge clock);
    #1;
    check("reset outputs", !busy && !err && vld == '0 && data_out_0 == '0 &&
          data_out_1 == '0 && data_out_2 == '0);
    resetn = 1'b1;
    @(posedge clock); #1;

    // random traffic, idle gaps now and then
    for (int n = 0; n < 300; n++) begin
      send_packet($urandom_range(1, MAX_PAYLOAD), $urandom_range(0, 2),
                  ($urandom_range(0, 3) == 0), dropped);
      check("no drop in normal traffic", !dropped);
      if ($urandom_range(0, 9) == 0) repeat ($urandom_range(1, 5)) @(posedge clock);
      #1;
    end
    wait_idle(300);
    for (int p = 0; p < 3; p++) check("all bytes delivered", expq[p].size() == 0);

    // time-out: a short packet that port 2 never reads
    rd_on[2] = 1'b0;
    n_before = n_read[2];
    send_packet(5, 2, 1'b0, dropped);
    wait_idle(TIMEOUT + 10);
    check("time-out empties FIFO 2", !vld_out_2 && n_read[2] == n_before);
    check("idle port shows 0", data_out_2 == '0);
    expq[2].delete();
    rd_on[2] = 1'b1;

    // dropped packet: a long packet to port 1, which is never read
    rd_on[1] = 1'b0;
    send_packet(MAX_PAYLOAD, 1, 1'b0, dropped);
    check("long packet dropped", dropped);
    check("no write after the drop", !vld_out_1);
    wait_idle(TIMEOUT + 10);
    check("FIFO 1 emptied", !vld_out_1);
    expq[1].delete();
    rd_on[1] = 1'b1;

    // the router works again afterwards
    for (int n = 0; n < 30; n++) begin
      send_packet($urandom_range(1, MAX_PAYLOAD), $urandom_range(0, 2),
                  ($urandom_range(0, 3) == 0), dropped);
      check("no drop after recovery", !dropped);
    end
    wait_idle(300);
    for (int p = 0; p < 3; p++) check("all bytes delivered at end", expq[p].size() == 0);

    check("wait for empty FIFO happened", n_wait > 0);
    check("FIFO full happened", n_full > 0);
    check("load after full happened", n_laf > 0);
    check("parity error flagged", n_err > 0);
    check("time-out soft reset happened", n_srst >= 2);
    check("packet dropped on soft reset", n_drop == 1);
    check("some packets timed", n_timed > 0);
    $display("packets %0d (bad %0d), waits %0d, full %0d, laf %0d, err %0d, soft resets %0d, drops %0d",
             n_pkts, n_bad, n_wait, n_full, n_laf, n_err, n_srst, n_drop);
    $display("bytes read: %0d %0d %0d, packets timed: %0d", n_read[0], n_read[1], n_read[2], n_timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
