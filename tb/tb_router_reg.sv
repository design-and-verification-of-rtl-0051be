// tb_router_reg: self-checking test of router_reg.
//
// The testbench plays the controller: for each packet it steps the control
// inputs through decode, first data, load data, FIFO full, load after full
// and parity check, with the FIFO full at random moments and other bytes
// on d_in while the register block must use its kept byte. It checks the
// byte offered to the FIFO in every writing clock against the packet, the
// flags low_pkt_valid and parity_done where they must be set, and err
// against a parity worked out in the testbench, for packets with correct
// and with corrupted parity bytes.
module tb_router_reg;
  import router_pkg::*;

  logic  clk = 1'b0;
  logic  rstn, pkt_valid, fifo_full, detect_add, ld_state, laf_state;
  logic  full_state, lfd_state, rst_int_reg;
  byte_t d_in, d_out;
  logic  err, parity_done, low_pkt_valid;

  localparam int MAX_PAYLOAD = 63;  // longest payload a header can give

  int checks = 0, failures = 0;
  int n_full_payload = 0, n_full_parity = 0, n_bad = 0, n_err = 0;

  router_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: d_out=%02h err=%0b pd=%0b lpv=%0b",
               what, $time, d_out, err, parity_done, low_pkt_valid);
    end
  endtask

  task automatic ctl(input logic da, lfd, ld, full, laf, rst);
    detect_add = da; lfd_state = lfd; ld_state = ld; full_state = full;
    laf_state = laf; rst_int_reg = rst;
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic send_packet(input int len, input logic [1:0] addr, input logic corrupt);
    byte_t bytes[$];
    byte_t par;
    header_t h;
    h.length = 6'(len); h.addr = addr;
    par = byte_t'(h);
    for (int k = 0; k < len; k++) begin
      bytes.push_back(byte_t'($urandom));
      par ^= bytes[k];
    end
    if (corrupt) begin
      par ^= byte_t'($urandom_range(1, 255));
      n_bad++;
    end
    bytes.push_back(par);
    // decode: header on the input
    ctl(1, 0, 0, 0, 0, 0); pkt_valid = 1'b1; d_in = byte_t'(h); fifo_full = 1'b0;
    tick();
    check("flags cleared by new header", !err && !parity_done && !low_pkt_valid);
    // first data: the header is offered while the source holds payload 0
    ctl(0, 1, 0, 0, 0, 0); d_in = bytes[0];
    #1 check("header to FIFO", d_out == byte_t'(h));
    tick();
    for (int k = 0; k < bytes.size(); k++) begin
      automatic logic last = (k == bytes.size() - 1);
      ctl(0, 0, 1, 0, 0, 0);
      pkt_valid = !last; d_in = bytes[k];
      fifo_full = ($urandom_range(0, 3) == 0);
      #1;
      if (!fifo_full) begin
        check("byte to FIFO", d_out == bytes[k]);
        tick();
      end else begin
        if (last) n_full_parity++; else n_full_payload++;
        tick();
        // FIFO full: the source now shows the next byte (or anything)
        repeat ($urandom_range(1, 3)) begin
          ctl(0, 0, 0, 1, 0, 0); d_in = byte_t'($urandom);
          pkt_valid = 1'($urandom);
          tick();
        end
        ctl(0, 0, 0, 0, 1, 0); fifo_full = 1'b0;
        #1 check("kept byte to FIFO", d_out == bytes[k]);
        check("low_pkt_valid marks parity kept", low_pkt_valid == last);
        tick();
      end
      if (!last) check("parity not done early", !parity_done);
    end
    check("low_pkt_valid after parity", low_pkt_valid);
    check("parity_done after parity", parity_done);
    ctl(0, 0, 0, 0, 0, 1); d_in = byte_t'($urandom); pkt_valid = 1'($urandom);
    tick();
    check("err", err == corrupt);
    check("low_pkt_valid cleared", !low_pkt_valid);
    if (err) n_err++;
    // idle in decode without a header: err must hold
    ctl(1, 0, 0, 0, 0, 0); pkt_valid = 1'b0;
    repeat ($urandom_range(0, 3)) begin
      tick();
      check("err holds while idle", err == corrupt);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstn = 1'b0; pkt_valid = 1'b0; fifo_full = 1'b0; d_in = '0;
    ctl(0, 0, 0, 0, 0, 0);
    repeat (2) @(posedge clk);
    #1;
    check("reset", !err && !parity_done && !low_pkt_valid);
    rstn = 1'b1;
    send_packet(1, 2'd0, 1'b0);
    send_packet(MAX_PAYLOAD, 2'd2, 1'b1);
    for (int n = 0; n < 400; n++)
      send_packet($urandom_range(1, MAX_PAYLOAD), 2'($urandom_range(0, 2)),
                  ($urandom_range(0, 2) == 0));
    check("full on payload, full on parity, bad parity seen",
          n_full_payload > 0 && n_full_parity > 0 && n_bad > 0 && n_err == n_bad);
    $display("full on payload %0d, on parity %0d, bad packets %0d", n_full_payload,
             n_full_parity, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
